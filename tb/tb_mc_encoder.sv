// tb_mc_encoder: self-checking test of the matrix-code encoder in its
// default 16-bit (4 x 4) geometry. Expected values use the textbook
// Hamming(7,4) equations with data bits d1..d4 at codeword positions
// 3, 5, 6, 7: c1 = d1^d2^d4, c2 = d1^d3^d4, c4 = d2^d3^d4, plus the overall
// parity of the seven bits; the column parity is the XOR of the four rows.
// All 65536 data words are checked.
module tb_mc_encoder;
  logic [15:0] data;
  logic [15:0] check;
  logic [3:0]  parity;
  int checks = 0, failures = 0;

  mc_encoder u_dut (.data(data), .check(check), .parity(parity));

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_c;
    logic [3:0]  exp_p;
    for (int w = 0; w < 65536; w++) begin
      data = 16'(w);
      exp_p = '0;
      for (int r = 0; r < 4; r++) begin
        logic d1, d2, d3, d4, c1, c2, c4;
        {d4, d3, d2, d1} = data[r*4 +: 4];
        c1 = d1 ^ d2 ^ d4;
        c2 = d1 ^ d3 ^ d4;
        c4 = d2 ^ d3 ^ d4;
        exp_c[r*4 +: 4] = {d1 ^ d2 ^ d3 ^ d4 ^ c1 ^ c2 ^ c4, c4, c2, c1};
        exp_p ^= data[r*4 +: 4];
      end
      #1;
      checks++;
      if (check !== exp_c || parity !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL data %h: check %h exp %h parity %h exp %h",
                                    data, check, exp_c, parity, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
