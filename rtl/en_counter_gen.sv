// en_counter_gen - timing sequencer of the coarse tuning loop (En_Counter
// Generator).
//
// Runs on the 19.2 MHz reference clock. After `start` it walks the coarse
// tuning bits from CAPS[9] down to CAPS[0]; for each bit it produces
//   EN_CNT   high for win_cycles(bit) REF cycles (the counting window),
//   one idle REF cycle for the counter in the VCO domain to settle,
//   COMP_CLK one REF cycle  (comparator samples the count),
//   DES_CLK  one REF cycle  (CAPS decision block decides the bit),
//   RST_CNT  one REF cycle  (counter cleared for the next bit).
// The order EN_CNT, COMP_CLK, DES_CLK, RST_CNT follows the original scheme; the
// single-cycle width of each strobe and the idle cycle are this design's
// choice. The windows are weighted: T_MIN/10 for CAPS[9:6], T_MIN/6,
// T_MIN/4, T_MIN/2 for CAPS[5], CAPS[4], CAPS[3], and T_MIN for CAPS[2:0],
// so all EN_CNT windows add up to 259/60 x T_MIN (259 cycles at T_MIN = 60)
// instead of 10 x T_MIN. One bit therefore takes window + 4 REF cycles.
// The "clock" strobes are synchronous enables in the REF_CLK domain.
// `bit_idx` names the bit being decided; `done` pulses one cycle after the
// last RST_CNT. `busy` is high from start to done.
`timescale 1ns/1fs
module en_counter_gen
  import synth_pkg::*;
#(
  parameter int unsigned T_MIN = T_MIN_DEFAULT
) (
  input  logic       clk,      // REF_CLK
  input  logic       rst_n,
  input  logic       start,
  output logic       en_cnt,
  output logic       comp_clk,
  output logic       des_clk,
  output logic       rst_cnt,
  output logic [3:0] bit_idx,
  output logic       busy,
  output logic       done
);

  typedef enum logic [2:0] {S_IDLE, S_COUNT, S_SETTLE, S_COMP, S_DES, S_RST} state_t;

  state_t      state;
  logic [15:0] cyc;       // cycles left in the counting window

  function automatic logic [15:0] window(input logic [3:0] b);
    return 16'(win_cycles(b, T_MIN));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cyc     <= '0;
      bit_idx <= 4'(NUM_CAPS - 1);
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_COUNT;
          bit_idx <= 4'(NUM_CAPS - 1);
          cyc     <= window(4'(NUM_CAPS - 1)) - 16'd1;
        end
        S_COUNT: begin
          if (cyc == 16'd0) state <= S_SETTLE;
          else              cyc   <= cyc - 16'd1;
        end
        S_SETTLE: state <= S_COMP;
        S_COMP:   state <= S_DES;
        S_DES:    state <= S_RST;
        S_RST: begin
          if (bit_idx == 4'd0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state   <= S_COUNT;
            bit_idx <= bit_idx - 4'd1;
            cyc     <= window(bit_idx - 4'd1) - 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign en_cnt   = (state == S_COUNT);
  assign comp_clk = (state == S_COMP);
  assign des_clk  = (state == S_DES);
  assign rst_cnt  = (state == S_RST);
  assign busy     = (state != S_IDLE);

endmodule
