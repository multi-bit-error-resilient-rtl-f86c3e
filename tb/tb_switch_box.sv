// tb_switch_box: self-checking test of the 4-side switch box. For random
// configurations and inputs, each output must be 1 exactly when some input
// side with a closed switch to it is 1; single-switch routes are also
// checked one by one.
module tb_switch_box;
  logic [15:0] cfg;
  logic [3:0]  in, out;
  int checks = 0, failures = 0;

  switch_box u_dut (.cfg(cfg), .in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // One switch closed: side t routed to side s only.
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < 4; t++) begin
        cfg = '0; cfg[s*4 + t] = 1'b1;
        in = 4'b0001 << t; #1;
        checks++;
        if (out !== (4'b0001 << s)) begin failures++; $display("FAIL route %0d->%0d out %b", t, s, out); end
        in = ~(4'b0001 << t); #1;
        checks++;
        if (out !== 4'b0000) begin failures++; $display("FAIL leak %0d->%0d out %b", t, s, out); end
      end
    for (int k = 0; k < 2000; k++) begin
      logic [3:0] exp;
      cfg = 16'($urandom); in = 4'($urandom); #1;
      for (int s = 0; s < 4; s++) begin
        exp[s] = 1'b0;
        for (int t = 0; t < 4; t++) if (cfg[s*4 + t] && in[t]) exp[s] = 1'b1;
      end
      checks++;
      if (out !== exp) begin failures++; $display("FAIL cfg %h in %b out %b exp %b", cfg, in, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
