// Self-checking test of free_list (16 registers, 4 in use after reset)
// against a reference bit vector: random allocations, releases and bulk
// returns; checks the lowest-first choice, the count and exhaustion.
module free_list_tb;
  localparam int N = 16, INIT = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_en = 0, alloc_valid, rel_en = 0;
  logic [3:0] alloc_id, rel_id = 0;
  logic [N-1:0] bulk_vec = '0, free_vec;
  logic [4:0] free_count;

  free_list #(.N(N), .INIT_USED(INIT)) dut (.*);

  logic [N-1:0] model;

  task automatic compare;
    int lowest, cnt;
    lowest = -1; cnt = 0;
    for (int i = N - 1; i >= 0; i--) if (model[i]) lowest = i;
    for (int i = 0; i < N; i++) cnt += model[i];
    checks++;
    if (free_vec !== model) begin failures++; $display("FAIL vec %b exp %b", free_vec, model); end
    checks++;
    if (alloc_valid !== (lowest >= 0) || (lowest >= 0 && alloc_id !== 4'(lowest))) begin
      failures++; $display("FAIL alloc %b %0d exp %0d", alloc_valid, alloc_id, lowest);
    end
    checks++;
    if (free_count !== 5'(cnt)) begin failures++; $display("FAIL count %0d exp %0d", free_count, cnt); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    for (int i = INIT; i < N; i++) model[i] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    // drain completely
    for (int i = 0; i < N - INIT; i++) begin
      alloc_en = 1;
      @(negedge clk);
      model[INIT + i] = 1'b0;
      compare();
    end
    alloc_en = 0;
    checks++;
    if (alloc_valid) begin failures++; $display("FAIL valid when empty"); end
    for (int it = 0; it < 400; it++) begin
      alloc_en = $urandom_range(0, 1);
      rel_en   = $urandom_range(0, 1);
      rel_id   = 4'($urandom);
      bulk_vec = ($urandom_range(0, 7) == 0) ? N'($urandom) : '0;
      #1;
      begin
        logic [N-1:0] nxt;
        nxt = model | bulk_vec;
        if (alloc_en && alloc_valid) nxt[alloc_id] = 1'b0;
        if (rel_en) nxt[rel_id] = 1'b1;
        @(negedge clk);
        model = nxt;
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
