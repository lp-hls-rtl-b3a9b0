// ALU processor with power-gated multiply and divide units.
//
// Eight function units (AND, OR, ADD, SUBTRACT, SHIFT_L, SHIFT_R, MULTIPLY,
// DIVIDE) share the operands a and b. An encoder turns the one-hot select sel
// into an opcode that enables one unit and steers the output multiplexer.
// MULTIPLY and DIVIDE, the largest units, each sit in their own switchable
// power domain with their own PMB sequencer, clock gate, power switch and
// isolation cells. mp = 1 asks to shut the multiplier domain off, dp = 1 the
// divider domain; the stimulus is expected to drive them in step with sel.
//
// Timing: every function has one clock of latency: the operands and sel
// applied before a rising edge give out after that edge. The simple units are
// registered in the always-on domain; MULTIPLY and DIVIDE register their
// result in their own domain on the gated clock. A MULTIPLY or DIVIDE issued
// while its domain is not active, or whose domain starts isolating before the
// result is read, yields out = 0 (isolation clamp) and out_valid = 0.
// mul_ready / div_ready show that a domain is active. The units keep no
// state that must outlive a shut-off (a result is recomputed on the next
// operation), so the PMBs' retention outputs are left unused.
// The unit set, the two switchable domains and the PMB follow the source
// design; widths, one-cycle latency, one-hot select and out_valid are this
// design's choices.
module alu_lp
  import lp_pkg::*;
#(
  parameter int unsigned W           = 16,
  parameter int unsigned RAMP_CYCLES = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [7:0]     sel,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           mp,
  input  logic           dp,
  output logic [2*W-1:0] out,
  output logic           out_valid,
  output logic           mul_ready,
  output logic           div_ready,
  output logic           mul_vdd,
  output logic           div_vdd
);

  alu_op_e        op, op_q;
  logic           sel_valid, valid_q;
  logic [2*W-1:0] y_and, y_or, y_add, y_sub, y_shl, y_shr, y_mul, y_div;
  logic [2*W-1:0] simple_res, simple_q, mul_iso, div_iso;
  logic           mul_ok_q, div_ok_q;

  alu_encoder u_enc (.sel, .en(op), .sel_valid);

  // always-on function units
  alu_and #(.W(W)) u_and (.a, .b, .y(y_and));
  alu_or  #(.W(W)) u_or  (.a, .b, .y(y_or));
  alu_add #(.W(W)) u_add (.a, .b, .y(y_add));
  alu_sub #(.W(W)) u_sub (.a, .b, .y(y_sub));
  alu_shl #(.W(W)) u_shl (.a, .b, .y(y_shl));
  alu_shr #(.W(W)) u_shr (.a, .b, .y(y_shr));

  // power control of the two switchable domains
  logic mul_iso_en, mul_ret_en, mul_pse, mul_cg, mul_gclk;
  logic div_iso_en, div_ret_en, div_pse, div_cg, div_gclk;
  pmb_state_e mul_state, div_state;

  pmb #(.RAMP_CYCLES(RAMP_CYCLES)) u_pmb_mul (
    .clk, .rst_n, .pwr_ctrl(mp), .iso_en(mul_iso_en), .ret_en(mul_ret_en),
    .pse(mul_pse), .clk_gate(mul_cg), .active(mul_ready), .state(mul_state)
  );
  pmb #(.RAMP_CYCLES(RAMP_CYCLES)) u_pmb_div (
    .clk, .rst_n, .pwr_ctrl(dp), .iso_en(div_iso_en), .ret_en(div_ret_en),
    .pse(div_pse), .clk_gate(div_cg), .active(div_ready), .state(div_state)
  );

  clock_gate u_cg_mul (.clk, .en(!mul_cg), .gclk(mul_gclk));
  clock_gate u_cg_div (.clk, .en(!div_cg), .gclk(div_gclk));

  power_switch #(.RAMP_CYCLES(RAMP_CYCLES)) u_psw_mul (.clk, .rst_n, .pse(mul_pse), .vdd(mul_vdd));
  power_switch #(.RAMP_CYCLES(RAMP_CYCLES)) u_psw_div (.clk, .rst_n, .pse(div_pse), .vdd(div_vdd));

  // switchable domains
  alu_mul #(.W(W)) u_mul (.clk(mul_gclk), .rst_n, .en(sel_valid && op == OP_MUL), .a, .b, .y(y_mul));
  alu_div #(.W(W)) u_div (.clk(div_gclk), .rst_n, .en(sel_valid && op == OP_DIV), .a, .b, .y(y_div));

  iso_cell #(.W(2*W)) u_iso_mul (.iso_en(mul_iso_en), .d(y_mul), .q(mul_iso));
  iso_cell #(.W(2*W)) u_iso_div (.iso_en(div_iso_en), .d(y_div), .q(div_iso));

  always_comb begin
    unique case (op)
      OP_AND:  simple_res = y_and;
      OP_OR:   simple_res = y_or;
      OP_ADD:  simple_res = y_add;
      OP_SUB:  simple_res = y_sub;
      OP_SHL:  simple_res = y_shl;
      OP_SHR:  simple_res = y_shr;
      default: simple_res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q     <= OP_AND;
      valid_q  <= 1'b0;
      simple_q <= '0;
      mul_ok_q <= 1'b0;
      div_ok_q <= 1'b0;
    end else begin
      op_q     <= op;
      valid_q  <= sel_valid;
      simple_q <= simple_res;
      mul_ok_q <= mul_ready;
      div_ok_q <= div_ready;
    end
  end

  // output multiplexer
  always_comb begin
    unique case (op_q)
      OP_MUL: begin
        out       = mul_iso;
        out_valid = valid_q && mul_ok_q && !mul_iso_en;
      end
      OP_DIV: begin
        out       = div_iso;
        out_valid = valid_q && div_ok_q && !div_iso_en;
      end
      default: begin
        out       = simple_q;
        out_valid = valid_q;
      end
    endcase
  end

endmodule
