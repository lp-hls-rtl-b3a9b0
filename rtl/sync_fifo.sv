// Synchronous FIFO in the always-on domain, placed at the input of a
// switchable domain.
//
// It accepts data while the domain is asleep or powering up, so no input is
// lost across a power cycle, and hands it on once the domain is released.
// DEPTH entries of W bits in a register array, read and write pointers with an
// occupancy counter; a push and a pop may happen in the same clock.
// Handshake on both sides is valid/ready: a word moves when both are high at
// a rising edge. out_data shows the head entry whenever out_valid is high
// (first-word fall-through, zero latency from push to visible head on the next
// cycle). Depth and handshake are this design's choice.
module sync_fifo #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      unique case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= int'(DEPTH));

endmodule
