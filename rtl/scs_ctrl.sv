// Control part of the SCS-MM-New multiplier.
//
// The published architecture only names the control part; this state machine is this
// design's own sequencing of the algorithm it describes:
//   IDLE       wait for start; load N^, B^ and A (ld_ops)
//   PRE_INIT   CCSA in 2H mode on (N^, B^)                    (M1/M2 = const)
//   PRE_CONV   CCSA in 2H mode on (SS, SC) until Zero_D sees SC = 0; then
//              D^ <- SS, SS and SC cleared, iteration index i = -1
//   LOOP       one iteration per cycle, CCSA in 1F mode on
//              (SS >> s, SC >> s, x), s = 2 after a skip, else 1;
//              i advances by 1 + skip_{i+1}; leaves after i = k+4
//   CONV_SHIFT the last pending shift s, CCSA in 2H mode, x unused
//   CONV       CCSA in 2H mode on (SS, SC) until SC = 0; SS is the result
//   DONE       done pulse for one cycle, back to IDLE
// The counter holds i + 1 (0 .. k+5). A skip is allowed only while the
// skipped iteration i + 1 is still inside the loop (i + 1 <= k + 4), since
// a skipped iteration still divides by two.
//
// Inputs sc_zero (Zero_D), skip (Skip_D, already gated by allow) and
// skipped (the skip flip-flop, which tells the muxes to shift by two) are
// sampled on the rising clock edge. Outputs are combinational from the
// state. busy is high from the cycle after start until done.
module scs_ctrl
  import scs_mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   sc_zero,
  input  logic   skip,
  input  logic   skipped,
  output opsel_e m12_sel,   // M1 and M2 select
  output logic   alpha,     // CCSA mode: 1 = 1F_CSA, 0 = 2H_CSA
  output logic   ld_ops,    // load N^, B^, A
  output logic   ss_we,     // write SS and SC from the CCSA
  output logic   ss_clr,    // clear SS, SC, q^, A^ and the skip flag
  output logic   d_we,      // D^ <- CCSA sum
  output logic   iter_en,   // loop iteration: update q^, A^, skip flag, shift A
  output logic   allow,     // skipping permitted this cycle
  output logic   busy,
  output logic   done
);
  localparam int unsigned CW = $clog2(K + 8);
  localparam logic [CW-1:0] LAST = CW'(K + 5);  // counter value of i = k+4

  state_e        st, st_n;
  logic [CW-1:0] cnt, cnt_n;   // i + 1

  always_comb begin
    st_n    = st;
    cnt_n   = cnt;
    m12_sel = OP_DIRECT;
    alpha   = 1'b0;
    ld_ops  = 1'b0;
    ss_we   = 1'b0;
    ss_clr  = 1'b0;
    d_we    = 1'b0;
    iter_en = 1'b0;
    allow   = 1'b0;
    busy    = 1'b1;
    done    = 1'b0;
    unique case (st)
      ST_IDLE: begin
        busy = 1'b0;
        if (start) begin
          ld_ops = 1'b1;
          st_n   = ST_PRE_INIT;
        end
      end
      ST_PRE_INIT: begin
        m12_sel = OP_CONST;
        ss_we   = 1'b1;
        st_n    = ST_PRE_CONV;
      end
      ST_PRE_CONV: begin
        if (sc_zero) begin
          d_we   = 1'b1;
          ss_clr = 1'b1;
          cnt_n  = '0;
          st_n   = ST_LOOP;
        end else begin
          ss_we = 1'b1;
        end
      end
      ST_LOOP: begin
        m12_sel = skipped ? OP_SHR2 : OP_SHR1;
        alpha   = 1'b1;
        ss_we   = 1'b1;
        iter_en = 1'b1;
        allow   = (cnt < LAST);
        cnt_n   = cnt + CW'(1) + CW'(skip);
        if (cnt_n > LAST) st_n = ST_CONV_SHIFT;
      end
      ST_CONV_SHIFT: begin
        m12_sel = skipped ? OP_SHR2 : OP_SHR1;
        ss_we   = 1'b1;
        st_n    = ST_CONV;
      end
      ST_CONV: begin
        if (sc_zero) st_n = ST_DONE;
        else         ss_we = 1'b1;
      end
      ST_DONE: begin
        done = 1'b1;
        st_n = ST_IDLE;
      end
      default: st_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= ST_IDLE;
      cnt <= '0;
    end else begin
      st  <= st_n;
      cnt <= cnt_n;
    end
  end

  // A skip can only be reported while the control part allows one.
  a_skip_allowed: assert property (@(posedge clk) disable iff (!rst_n) skip |-> allow);
endmodule
