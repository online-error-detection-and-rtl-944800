// Self-checking test of erratic_recovery with an 8-bit value plus parity.
// The register file is modelled here: 16 words with a per-word stuck-at mask.
// Cases: the worked erratic-bit example (bit 3 stuck at 1: A = 00111011(0),
// C = 11001100(1), D = 00110011(0), E = 00001000(0)); the same faulty read
// caused by a particle strike (E = 0, soft error); a stuck parity bit; a
// clean re-read (REC_OK); then random stuck bits and random flips in random
// values. Checks the 6-cycle start-to-done latency (3 on the clean path).
module erratic_recovery_tb;
  import erratic_pkg::*;
  localparam int DEPTH = 16, W = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, busy, done;
  logic [3:0]  reg_idx = 0, rx, rf_rd_addr, rf_wr_addr;
  rec_result_t result;
  logic [W:0]  d_word, e_word, rf_rd_word, rf_wr_word;
  logic        rf_wr_en;

  erratic_recovery #(.DEPTH(DEPTH), .W(W)) dut (.*);

  logic [W:0] mem   [DEPTH];
  logic [W:0] smask [DEPTH];
  logic [W:0] sval  [DEPTH];

  always_comb rf_rd_word = mem[rf_rd_addr];
  always_ff @(posedge clk)
    if (rf_wr_en) mem[rf_wr_addr] <= (rf_wr_word & ~smask[rf_wr_addr]) | (sval[rf_wr_addr] & smask[rf_wr_addr]);

  function automatic logic [W:0] with_par(input logic [W-1:0] v);
    return {^v, v};
  endfunction

  task automatic expect_eq(input string what, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b expected %b", what, got, exp); end
  endtask

  task automatic run(input int r, input rec_result_t exp_res, input logic [W:0] exp_d,
                     input logic [W:0] exp_e, input int exp_lat);
    int lat;
    @(negedge clk);
    start = 1; reg_idx = 4'(r);
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
    checks++;
    if (result !== exp_res) begin failures++; $display("FAIL reg %0d result %s expected %s", r, result.name(), exp_res.name()); end
    checks++;
    if (lat != exp_lat) begin failures++; $display("FAIL latency %0d expected %0d", lat, exp_lat); end
    if (exp_res != REC_SOFT) expect_eq("D", d_word, exp_d);
    expect_eq("E", e_word, exp_e);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin mem[i] = '0; smask[i] = '0; sval[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // erratic bit: register 3 holds 00110011(0), bit 3 stuck at 1
    mem[3] = 9'b0_0011_1011; smask[3] = 9'b0_0000_1000; sval[3] = 9'h1FF;
    run(3, REC_ERRATIC, 9'b0_0011_0011, 9'b0_0000_1000, 6);
    expect_eq("Rx after recovery", mem[3], 9'b1_1100_1100);

    // soft error: same faulty read, cells healthy
    mem[4] = 9'b0_0011_1011;
    run(4, REC_SOFT, '0, '0, 6);
    expect_eq("Rx after soft error", mem[4], 9'b1_1100_0100);

    // stuck parity bit
    mem[5] = 9'b1_0011_0011; smask[5] = 9'b1_0000_0000; sval[5] = 9'h1FF;
    run(5, REC_ERRATIC, 9'b0_0011_0011, 9'b1_0000_0000, 6);

    // clean word: the sequence stops after the check
    mem[6] = with_par(8'hA5);
    run(6, REC_OK, with_par(8'hA5), '0, 3);
    expect_eq("clean Rx untouched", mem[6], with_par(8'hA5));

    for (int it = 0; it < 200; it++) begin
      int r, b;
      logic [W:0] orig, m;
      r = $urandom_range(0, DEPTH - 1);
      b = $urandom_range(0, W);
      orig = with_par(8'($urandom));
      m = 9'd1 << b;
      smask[r] = '0;
      if (it % 2 == 0) begin
        // stuck at the opposite of the stored bit, so the read is wrong
        smask[r] = m; sval[r] = ~orig;
        mem[r] = orig ^ m;
        run(r, REC_ERRATIC, orig, m, 6);
      end else begin
        mem[r] = orig ^ m;
        run(r, REC_SOFT, '0, '0, 6);
      end
      smask[r] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
