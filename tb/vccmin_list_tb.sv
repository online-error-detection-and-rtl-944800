// Self-checking test of vccmin_list (16 registers, T = 20): registers added
// at random times must be held until the next multiple of T cycles, then
// released all at once in a one-cycle pulse, exactly every T cycles.
module vccmin_list_tb;
  localparam int N = 16, T = 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic add_en = 0, release_pulse;
  logic [3:0] add_id = 0;
  logic [N-1:0] q_vec, release_vec;
  logic [4:0] count;

  vccmin_list #(.N(N), .T(T)) dut (.*);

  logic [N-1:0] model;
  int cyc, pulses;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0; pulses = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // cycle k: the k-th rising edge after reset release
    for (cyc = 1; cyc <= 10 * T; cyc++) begin
      logic exp_pulse;
      logic [N-1:0] exp_vec;
      add_en = ($urandom_range(0, 4) == 0);
      add_id = 4'($urandom);
      @(negedge clk);
      exp_pulse = (cyc % T == 0);
      exp_vec   = exp_pulse ? model : '0;
      if (exp_pulse) model = '0;
      if (add_en) model[add_id] = 1'b1;
      checks++;
      if (release_pulse !== exp_pulse) begin failures++; $display("FAIL pulse at cycle %0d", cyc); end
      checks++;
      if (release_vec !== exp_vec) begin failures++; $display("FAIL release_vec %b exp %b", release_vec, exp_vec); end
      checks++;
      if (q_vec !== model) begin failures++; $display("FAIL q_vec %b exp %b", q_vec, model); end
      checks++;
      if (count !== 5'($countones(model))) begin failures++; $display("FAIL count"); end
      if (release_pulse) pulses++;
    end
    checks++;
    if (pulses != 10) begin failures++; $display("FAIL %0d releases in %0d cycles", pulses, 10 * T); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
