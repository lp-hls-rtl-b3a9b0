// Top level of the three power-gated example designs, side by side.
//
//   rca_* : 32-bit ripple-carry adder whose upper 16 bits can be shut off
//           (rca32_lp)
//   alu_* : ALU with eight functions whose multiply and divide units are in
//           two switchable domains (alu_lp)
//   idct_*: 8x8 IDCT in a switchable domain behind an input FIFO, for the
//           IDCT stage of a JPEG decoder (idct_lp)
// The three share clk and rst_n and are otherwise independent; every port of
// each design is brought out with its prefix. The designs' own headers give
// their timing. The decoder stages feeding idct_in_* (variable-length
// decoding, zig-zag, dequantisation) and consuming idct_out_* are outside.
module lp_hls_top #(
  parameter int unsigned ALU_W       = 16,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned RAMP_CYCLES = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // 32-bit RCA
  input  logic [31:0]        rca_a,
  input  logic [31:0]        rca_b,
  input  logic               rca_cin,
  input  logic               rca_p_shutoff,
  output logic [31:0]        rca_s,
  output logic               rca_cout,
  output logic               rca_msb_ready,
  output logic               rca_msb_vdd,
  // ALU
  input  logic [7:0]         alu_sel,
  input  logic [ALU_W-1:0]   alu_a,
  input  logic [ALU_W-1:0]   alu_b,
  input  logic               alu_mp,
  input  logic               alu_dp,
  output logic [2*ALU_W-1:0] alu_out,
  output logic               alu_out_valid,
  output logic               alu_mul_ready,
  output logic               alu_div_ready,
  output logic               alu_mul_vdd,
  output logic               alu_div_vdd,
  // IDCT
  input  logic               idct_sleep_req,
  input  logic               idct_in_valid,
  output logic               idct_in_ready,
  input  logic [11:0]        idct_in_data,
  output logic               idct_out_valid,
  input  logic               idct_out_ready,
  output logic [7:0]         idct_out_data,
  output logic               idct_active
);

  rca32_lp #(.RAMP_CYCLES(RAMP_CYCLES)) u_rca (
    .clk, .rst_n, .a(rca_a), .b(rca_b), .cin(rca_cin), .p_shutoff(rca_p_shutoff),
    .s_out(rca_s), .c_out(rca_cout), .msb_ready(rca_msb_ready), .msb_vdd(rca_msb_vdd)
  );

  alu_lp #(.W(ALU_W), .RAMP_CYCLES(RAMP_CYCLES)) u_alu (
    .clk, .rst_n, .sel(alu_sel), .a(alu_a), .b(alu_b), .mp(alu_mp), .dp(alu_dp),
    .out(alu_out), .out_valid(alu_out_valid), .mul_ready(alu_mul_ready),
    .div_ready(alu_div_ready), .mul_vdd(alu_mul_vdd), .div_vdd(alu_div_vdd)
  );

  idct_lp #(.FIFO_DEPTH(FIFO_DEPTH), .RAMP_CYCLES(RAMP_CYCLES)) u_idct (
    .clk, .rst_n, .sleep_req(idct_sleep_req),
    .in_valid(idct_in_valid), .in_ready(idct_in_ready), .in_data(idct_in_data),
    .out_valid(idct_out_valid), .out_ready(idct_out_ready), .out_data(idct_out_data),
    .idct_active
  );

endmodule
