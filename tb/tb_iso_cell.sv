// Self-checking testbench for iso_cell: with iso_en low the output must equal
// the input; with iso_en high it must equal the clamp value, for a clamp-to-0
// and a clamp-to-1 instance, over random data.
module tb_iso_cell;
  logic        iso_en;
  logic [15:0] d, q0, q1;
  int          checks = 0, failures = 0;

  iso_cell #(.W(16))                 u_dut0 (.iso_en, .d, .q(q0));
  iso_cell #(.W(16), .CLAMP(1'b1))   u_dut1 (.iso_en, .d, .q(q1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d      = 16'($urandom);
      iso_en = 1'($urandom);
      #1;
      checks += 2;
      if (q0 !== (iso_en ? 16'h0000 : d)) begin
        failures++;
        $display("clamp0 iso=%b d=%h q=%h", iso_en, d, q0);
      end
      if (q1 !== (iso_en ? 16'hffff : d)) begin
        failures++;
        $display("clamp1 iso=%b d=%h q=%h", iso_en, d, q1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
