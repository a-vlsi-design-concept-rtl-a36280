// evd_controller: sequencer of the Jacobi EVD array.
//
// One run: load the matrix, then num_sweeps sweeps of N-1 parallel steps,
// then read the result out. Each step is
//   SEARCH : search_start, SEARCH_IT+1 cycles (diagonal PEs pick angles)
//   ROTL   : rotl_start, 1+MAX_CYC cycles   (left rotation, theta_r)
//   ROTR   : rotr_start, 1+MAX_CYC cycles   (right rotation, theta_c)
//   XCHG   : xchg_en, 1 cycle               (interchange of the elements)
// i.e. 22 cycles per step, (N-1)*22 per sweep. The rotation
// slots have the fixed length of the slowest rotation sequence (6 cycles),
// as in the reference design where the global timing is set by the
// critical index; an assertion checks that no PE is still busy at the end
// of a slot. Stopping after a preset number of sweeps follows the
// reference; the state encoding and handshakes are this design's own.
//
// Handshakes: start (in IDLE) begins a run; load_go is high in LOAD until
// the input block reports load_done; out_go is pulsed once and OUT waits for
// out_done. done pulses for one cycle at the end of a run.
module evd_controller
  import evd_pkg::*;
#(
  parameter int unsigned M = 25,
  localparam int unsigned N = 2 * M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] num_sweeps,
  input  logic       load_done,
  input  logic       out_done,
  input  logic       busy_any,
  output logic       load_go,
  output logic       search_start,
  output logic       rotl_start,
  output logic       rotr_start,
  output logic       xchg_en,
  output logic       out_go,
  output logic       busy,
  output logic       done,
  output logic [7:0] sweep,
  output logic [7:0] step
);

  localparam int unsigned SEARCH_LEN = SEARCH_IT + 1;
  localparam int unsigned ROT_LEN    = MAX_CYC + 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_SEARCH, S_ROTL, S_ROTR, S_XCHG, S_OUT, S_DONE
  } state_e;

  state_e     state;
  logic [3:0] cnt;
  logic       first;   // first cycle of a state

  assign busy         = (state != S_IDLE);
  assign load_go      = (state == S_LOAD);
  assign search_start = (state == S_SEARCH) && first;
  assign rotl_start   = (state == S_ROTL) && first;
  assign rotr_start   = (state == S_ROTR) && first;
  assign xchg_en      = (state == S_XCHG);
  assign out_go       = (state == S_OUT) && first;
  assign done         = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      first <= 1'b0;
      sweep <= '0;
      step  <= '0;
    end else begin
      first <= 1'b0;
      cnt   <= cnt + 4'd1;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          sweep <= '0;
          step  <= '0;
        end
        S_LOAD: if (load_done) begin
          state <= (num_sweeps == 8'd0) ? S_OUT : S_SEARCH;
          first <= 1'b1;
          cnt   <= '0;
        end
        S_SEARCH: if (cnt == 4'(SEARCH_LEN - 1)) begin
          state <= S_ROTL;
          first <= 1'b1;
          cnt   <= '0;
        end
        S_ROTL: if (cnt == 4'(ROT_LEN - 1)) begin
          state <= S_ROTR;
          first <= 1'b1;
          cnt   <= '0;
        end
        S_ROTR: if (cnt == 4'(ROT_LEN - 1)) begin
          state <= S_XCHG;
          cnt   <= '0;
        end
        S_XCHG: begin
          first <= 1'b1;
          cnt   <= '0;
          if (step == 8'(N - 2)) begin
            step <= '0;
            if (sweep == num_sweeps - 8'd1) begin
              sweep <= sweep + 8'd1;
              state <= S_OUT;
            end else begin
              sweep <= sweep + 8'd1;
              state <= S_SEARCH;
            end
          end else begin
            step  <= step + 8'd1;
            state <= S_SEARCH;
          end
        end
        S_OUT: if (out_done) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A rotation slot must be long enough for every PE's sequence.
  a_slot_long_enough: assert property (@(posedge clk) disable iff (!rst_n)
    (rotr_start || xchg_en) |-> !busy_any)
    else $error("PE still rotating at the end of a rotation slot");

endmodule
