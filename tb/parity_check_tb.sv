// Self-checking test of parity_check: the four words of the worked example
// (original, faulty read A, inverted B, re-read C) and random 64-bit words
// with a counted number of flipped bits.
module parity_check_tb;
  int checks = 0, failures = 0;

  logic [8:0]  w8;  logic e8;
  logic [64:0] w64; logic e64;

  parity_check #(.W(8))  dut8  (.word(w8),  .error(e8));
  parity_check #(.W(64)) dut64 (.word(w64), .error(e64));

  task automatic chk8(input logic [8:0] w, input logic exp);
    w8 = w; #1;
    checks++;
    if (e8 !== exp) begin failures++; $display("FAIL %b: error=%b expected %b", w, e8, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w64 = '0;
    chk8(9'b0_0011_0011, 1'b0);  // original value
    chk8(9'b0_0011_1011, 1'b1);  // A: stuck bit
    chk8(9'b1_1100_0100, 1'b0);  // B = NOT(A)
    chk8(9'b1_1100_1100, 1'b1);  // C: re-read through the stuck bit
    for (int i = 0; i < 500; i++) begin
      logic [63:0] d;
      logic [64:0] good;
      int nflip;
      int ones;
      d = {$urandom, $urandom};
      ones = 0;
      for (int b = 0; b < 64; b++) ones += d[b];
      good = {1'(ones % 2), d};
      nflip = $urandom_range(0, 3);
      w64 = good;
      for (int k = 0; k < nflip; k++) w64[k * 17 + (i % 16)] ^= 1'b1;
      #1;
      checks++;
      if (e64 !== 1'(nflip % 2)) begin failures++; $display("FAIL flips=%0d error=%b", nflip, e64); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
