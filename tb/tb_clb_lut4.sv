// tb_clb_lut4: self-checking test of the 4-input LUT. Random truth tables
// and every input combination; also the inverter configuration 16'h5555,
// whose output must be the inverse of a[0] whatever a[3:1] are.
module tb_clb_lut4;
  logic [15:0] cfg;
  logic [3:0]  a;
  logic        o;
  int checks = 0, failures = 0;

  clb_lut4 u_dut (.cfg(cfg), .a(a), .o(o));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = 16'h5555;
    for (int i = 0; i < 16; i++) begin
      a = 4'(i); #1;
      checks++;
      if (o !== !a[0]) begin failures++; $display("FAIL inverter a=%b o=%b", a, o); end
    end
    for (int t = 0; t < 200; t++) begin
      cfg = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        int idx;
        a = 4'(i); #1;
        idx = 8 * a[3] + 4 * a[2] + 2 * a[1] + a[0];
        checks++;
        if (o !== ((cfg >> idx) & 1)) begin failures++; $display("FAIL cfg %h a %b o %b", cfg, a, o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
