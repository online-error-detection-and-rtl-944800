// Self-checking test of parity_gen: the worked example value 00110011 (parity
// 0), its faulty read 00111011 (parity 1 if regenerated), and random 64-bit
// values against a bit-by-bit ones count.
module parity_gen_tb;
  int checks = 0, failures = 0;

  logic [7:0]  d8;  logic p8;
  logic [63:0] d64; logic p64;

  parity_gen #(.W(8))  dut8  (.data(d8),  .parity(p8));
  parity_gen #(.W(64)) dut64 (.data(d64), .parity(p64));

  function automatic logic ref_par(input logic [63:0] v, input int n);
    int ones = 0;
    for (int i = 0; i < n; i++) ones += v[i];
    return ones % 2 == 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d8 = 8'b0011_0011; d64 = '0; #1;
    checks++; if (p8 !== 1'b0) begin failures++; $display("FAIL example: %b", p8); end
    d8 = 8'b0011_1011; #1;
    checks++; if (p8 !== 1'b1) begin failures++; $display("FAIL odd: %b", p8); end
    for (int i = 0; i < 500; i++) begin
      d64 = {$urandom, $urandom};
      d8  = 8'($urandom);
      #1;
      checks++;
      if (p64 !== ref_par(d64, 64)) begin failures++; $display("FAIL 64: %h -> %b", d64, p64); end
      checks++;
      if (p8 !== ref_par(64'(d8), 8)) begin failures++; $display("FAIL 8: %h -> %b", d8, p8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
