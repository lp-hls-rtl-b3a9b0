// 8x8 two-dimensional inverse DCT, as used in a JPEG decoder.
//
// The 2-D transform is computed as a 1-D IDCT on each column of the
// coefficient block followed by a 1-D IDCT on each row of the result:
//   f(y,x) = sum_u sum_v M(y,u) M(x,v) F(u,v),  M(x,u) = c(u)/2 cos((2x+1)u pi/16)
// with c(0) = 1/sqrt(2), c(u>0) = 1. M is held as a 64-entry constant table
// scaled by 2^13, built at elaboration from the nine cosine values in lp_pkg
// using the symmetries of cos.
//
// Operation, one block at a time, in four phases:
//   LOAD : accept 64 signed CW-bit coefficients F(u,v) in row-major order
//          (in_valid/in_ready), one per clock.
//   COL  : 64 clocks; each computes one element of T = M * F with eight
//          multipliers and keeps it with 3 fraction bits.
//   ROW  : 64 clocks; each computes one element of T * M^T, rounds it, adds the
//          128 level shift and clamps it to 0..255.
//   OUT  : deliver the 64 pixels in row-major order (out_valid/out_ready).
// A block takes 256 clocks when the output is never stalled. idle is high in
// LOAD before the first coefficient of a block.
//
// The module sits in a switchable power domain: clk is the gated domain clock.
// The control state (phase and counter) is held in a retention register whose
// shadow runs on aon_clk, so the block wakes up in the phase it was in when
// ret_en rose; vdd and ret_en come from the domain's power switch and PMB.
// The column-then-row order follows the source design; the architecture,
// precision, I/O order, level shift and clamping are this design's choice.
module idct8x8
  import lp_pkg::*;
#(
  parameter int unsigned CW = 12
) (
  input  logic                 clk,
  input  logic                 aon_clk,
  input  logic                 rst_n,
  input  logic                 vdd,
  input  logic                 ret_en,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [CW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [7:0]           out_data,
  output logic                 idle
);

  localparam int TW = CW + 6;        // column-pass result, 3 fraction bits
  localparam int AW = TW + 14 + 3;   // accumulator width

  typedef logic signed [13:0] mcoef_t;

  function automatic mcoef_t mcoef(input int x, input int u);
    int k;
    int s;
    k = ((2 * x + 1) * u) % 32;
    s = 1;
    if (k > 16) k = 32 - k;
    if (k > 8) begin
      k = 16 - k;
      s = -1;
    end
    if (u == 0) return mcoef_t'(IDCT_COS[4]);
    return mcoef_t'(s * IDCT_COS[k]);
  endfunction

  // control state, retained across power-down
  idct_phase_e phase, phase_n;
  logic [5:0]  cnt, cnt_n;
  logic [7:0]  ctl_q;

  ret_reg #(.W(8)) u_ctl_ret (
    .clk, .aon_clk, .rst_n, .vdd, .ret_en, .en(1'b1),
    .d({phase_n, cnt_n}), .q(ctl_q)
  );
  assign phase = idct_phase_e'(ctl_q[7:6]);
  assign cnt   = ctl_q[5:0];

  logic signed [CW-1:0] coef [64];
  logic signed [TW-1:0] tmp  [64];
  logic [7:0]           pix  [64];

  logic [2:0] hi, lo;
  assign hi = cnt[5:3];
  assign lo = cnt[2:0];

  // one dot product per clock: column pass uses column lo of F with row hi of M,
  // row pass uses row hi of T with row lo of M
  logic signed [AW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < 8; k++) begin
      if (phase == IDCT_COL)
        acc += AW'(coef[k*8 + int'(lo)]) * AW'(mcoef(int'(hi), k));
      else
        acc += AW'(tmp[int'(hi)*8 + k]) * AW'(mcoef(int'(lo), k));
    end
  end

  logic signed [AW-1:0] col_val, row_val;
  logic [7:0]           pix_val;
  assign col_val = (acc + (AW'(1) <<< 9)) >>> 10;
  assign row_val = ((acc + (AW'(1) <<< 15)) >>> 16) + AW'(128);
  assign pix_val = (row_val < 0) ? 8'd0 : (row_val > 255) ? 8'd255 : row_val[7:0];

  assign in_ready  = (phase == IDCT_LOAD);
  assign out_valid = (phase == IDCT_OUT);
  assign out_data  = pix[cnt];
  assign idle      = (phase == IDCT_LOAD) && (cnt == '0);

  always_comb begin
    phase_n = phase;
    cnt_n   = cnt;
    unique case (phase)
      IDCT_LOAD: if (in_valid) begin
                   cnt_n = cnt + 1'b1;
                   if (cnt == 6'd63) phase_n = IDCT_COL;
                 end
      IDCT_COL:  begin
                   cnt_n = cnt + 1'b1;
                   if (cnt == 6'd63) phase_n = IDCT_ROW;
                 end
      IDCT_ROW:  begin
                   cnt_n = cnt + 1'b1;
                   if (cnt == 6'd63) phase_n = IDCT_OUT;
                 end
      IDCT_OUT:  if (out_ready) begin
                   cnt_n = cnt + 1'b1;
                   if (cnt == 6'd63) phase_n = IDCT_LOAD;
                 end
      default:   phase_n = IDCT_LOAD;
    endcase
  end

  always_ff @(posedge clk) begin
    unique case (phase)
      IDCT_LOAD: if (in_valid) coef[cnt] <= in_data;
      IDCT_COL:  tmp[cnt] <= col_val[TW-1:0];
      IDCT_ROW:  pix[cnt] <= pix_val;
      default:   ;
    endcase
  end

endmodule
