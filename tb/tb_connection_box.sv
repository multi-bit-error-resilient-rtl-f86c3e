// tb_connection_box: self-checking test of the connection box. For random
// configurations and inputs, each LUT input must be 1 exactly when some track
// with a closed switch to it is 1; single-switch routes are also
// checked one by one.
module tb_connection_box;
  logic [15:0] cfg;
  logic [3:0]  tracks, out;
  int checks = 0, failures = 0;

  connection_box u_dut (.cfg(cfg), .tracks(tracks), .lut_in(out));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // One switch closed: track t routed to LUT input s only.
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < 4; t++) begin
        cfg = '0; cfg[s*4 + t] = 1'b1;
        tracks = 4'b0001 << t; #1;
        checks++;
        if (out !== (4'b0001 << s)) begin failures++; $display("FAIL route %0d->%0d out %b", t, s, out); end
        tracks = ~(4'b0001 << t); #1;
        checks++;
        if (out !== 4'b0000) begin failures++; $display("FAIL leak %0d->%0d out %b", t, s, out); end
      end
    for (int k = 0; k < 2000; k++) begin
      logic [3:0] exp;
      cfg = 16'($urandom); tracks = 4'($urandom); #1;
      for (int s = 0; s < 4; s++) begin
        exp[s] = 1'b0;
        for (int t = 0; t < 4; t++) if (cfg[s*4 + t] && tracks[t]) exp[s] = 1'b1;
      end
      checks++;
      if (out !== exp) begin failures++; $display("FAIL cfg %h tracks %b out %b exp %b", cfg, tracks, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
