// Self-checking test of rat (8 architectural, 32 physical registers):
// identity mapping after reset, random renames with the replaced mapping
// reported, and remaps that redirect every entry pointing at one physical
// register, with remap_hit.
module rat_tb;
  localparam int NARCH = 8, NPHYS = 32, NRD = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] lk_arch [NRD];
  logic [4:0] lk_preg [NRD];
  logic       ren_we = 0, remap_en = 0, remap_hit;
  logic [2:0] ren_arch = 0;
  logic [4:0] ren_preg = 0, ren_old, remap_old = 0, remap_new = 0;

  rat #(.NARCH(NARCH), .NPHYS(NPHYS), .NRD(NRD)) dut (.*);

  logic [4:0] model [NARCH];

  task automatic compare;
    for (int a = 0; a < NARCH; a++) begin
      lk_arch[0] = 3'(a); lk_arch[1] = 3'(NARCH - 1 - a); #1;
      checks++;
      if (lk_preg[0] !== model[a] || lk_preg[1] !== model[NARCH - 1 - a]) begin
        failures++; $display("FAIL lookup %0d: %0d exp %0d", a, lk_preg[0], model[a]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NARCH; a++) model[a] = 5'(a);
    lk_arch[0] = 0; lk_arch[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int it = 0; it < 300; it++) begin
      logic hit;
      @(negedge clk);
      ren_we = 0; remap_en = 0;
      if ($urandom_range(0, 2) != 0) begin
        ren_we = 1; ren_arch = 3'($urandom); ren_preg = 5'($urandom_range(0, 7));
        #1;
        checks++;
        if (ren_old !== model[ren_arch]) begin failures++; $display("FAIL ren_old"); end
        model[ren_arch] = ren_preg;
      end else begin
        remap_en = 1; remap_old = 5'($urandom_range(0, 7)); remap_new = 5'($urandom_range(8, 31));
        #1;
        hit = 0;
        for (int a = 0; a < NARCH; a++) if (model[a] == remap_old) begin hit = 1; model[a] = remap_new; end
        checks++;
        if (remap_hit !== hit) begin failures++; $display("FAIL remap_hit %b exp %b", remap_hit, hit); end
      end
      @(negedge clk);
      ren_we = 0; remap_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
