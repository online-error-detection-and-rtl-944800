// Full-size run of erratic_rf_top with its default parameters (128 physical
// and 16 architectural registers, 4 spares, 64-bit values, 2 read ports,
// T = 1,000,000 cycles). One complete pass through each organisation:
// physical side: rename and write all architectural registers, an erratic
// bit found on a read and recovered into a new register, a soft error, and
// the quarantine release after T cycles; architectural side: an erratic
// register moved into its spare slot, a second register of that slot
// evicting it, and the migration back to the normal file after T cycles.
module erratic_rf_top_full_tb;
  import erratic_pkg::*;
  localparam int NPHYS = PRF_REGS_DEF, NARCH = ARCH_REGS_DEF, NSPARE = SPARE_REGS_DEF;
  localparam int W = DATA_W_DEF, NRD = RD_PORTS_DEF, T = QUARANTINE_DEF;
  localparam int PW = $clog2(NPHYS), LW = $clog2(NARCH);
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic p_ren_req = 0, p_ren_grant;
  logic [LW-1:0] p_ren_arch = 0;
  logic [PW-1:0] p_ren_preg, p_ren_old;
  logic [LW-1:0] p_lk_arch [NRD];
  logic [PW-1:0] p_lk_preg [NRD];
  logic p_rel_en = 0; logic [PW-1:0] p_rel_preg = 0;
  logic p_wr_en = 0; logic [PW-1:0] p_wr_preg = 0; logic [W-1:0] p_wr_data = 0;
  logic p_rd_en [NRD]; logic [PW-1:0] p_rd_preg [NRD];
  logic [W-1:0] p_rd_data [NRD]; logic p_rd_err [NRD];
  logic p_stall, p_flush, p_rec_done, p_rec_remapped, p_rec_rat_hit, p_vccmin_release;
  rec_result_t p_rec_result;
  logic [PW-1:0] p_rec_preg, p_rec_new_preg;
  logic [W-1:0] p_rec_data; logic [W:0] p_rec_err_mask;
  logic [PW:0] p_free_count, p_vccmin_count;
  logic [NPHYS-1:0] p_free_vec, p_quarantined;
  logic p_inj_stuck_we = 0, p_inj_flip_we = 0;
  logic [PW-1:0] p_inj_addr = 0; logic [W:0] p_inj_mask = 0, p_inj_value = 0;

  logic a_wr_en = 0; logic [LW-1:0] a_wr_tag = 0; logic [W-1:0] a_wr_data = 0;
  logic a_rd_en [NRD]; logic [LW-1:0] a_rd_tag [NRD];
  logic [W-1:0] a_rd_data [NRD]; logic a_rd_bank [NRD]; logic a_rd_err [NRD];
  logic a_stall, a_flush, a_rec_done, a_rec_to_spare, a_rec_evicted, a_migrating;
  rec_result_t a_rec_result;
  logic [LW-1:0] a_rec_tag, a_rec_evict_tag;
  logic [W-1:0] a_rec_data; logic [W:0] a_rec_err_mask;
  logic [NARCH-1:0] a_in_spare;
  logic a_inj_stuck_we = 0, a_inj_flip_we = 0, a_inj_bank = 0;
  logic [LW-1:0] a_inj_addr = 0; logic [W:0] a_inj_mask = 0, a_inj_value = 0;

  erratic_rf_top dut (.*);

  logic [W-1:0]  pval [NPHYS];
  logic [PW-1:0] pmap [NARCH];
  logic [W-1:0]  aval [NARCH];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [W:0] pw(input logic [W-1:0] v);
    return {^v, v};
  endfunction

  initial begin
    repeat (T + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic p_produce(input int a, input logic [W-1:0] v);
    logic [PW-1:0] p, old;
    @(negedge clk);
    p_ren_req = 1; p_ren_arch = LW'(a); #1;
    check(p_ren_grant === 1'b1, "rename granted");
    p = p_ren_preg; old = p_ren_old;
    @(negedge clk);
    p_ren_req = 0; p_wr_en = 1; p_wr_preg = p; p_wr_data = v;
    @(negedge clk);
    p_wr_en = 0; p_rel_en = 1; p_rel_preg = old;
    @(negedge clk);
    p_rel_en = 0;
    pmap[a] = p; pval[p] = v;
  endtask

  // read arch a on port 0; returns 1 if it failed and a recovery ran
  task automatic p_read(input int a, output logic failed);
    @(negedge clk);
    p_lk_arch[0] = LW'(a); #1;
    check(p_lk_preg[0] === pmap[a], "lookup");
    p_rd_en[0] = 1; p_rd_preg[0] = p_lk_preg[0]; #1;
    failed = p_rd_err[0];
    if (!failed) check(p_rd_data[0] === pval[pmap[a]], $sformatf("read arch %0d", a));
    while (p_stall) begin @(negedge clk); p_rd_en[0] = 0; end
    if (failed) check(p_rec_done === 1'b1, "recovery reported");
    @(negedge clk);
    p_rd_en[0] = 0;
  endtask

  task automatic a_write(input int t, input logic [W-1:0] v);
    @(negedge clk);
    while (a_stall) @(negedge clk);
    a_wr_en = 1; a_wr_tag = LW'(t); a_wr_data = v;
    @(negedge clk);
    a_wr_en = 0;
    aval[t] = v;
  endtask

  task automatic a_read(input int t, output logic failed);
    @(negedge clk);
    while (a_stall) @(negedge clk);
    a_rd_en[0] = 1; a_rd_tag[0] = LW'(t); #1;
    failed = a_rd_err[0];
    if (!failed) check(a_rd_data[0] === aval[t], $sformatf("arf read tag %0d", t));
    while (a_stall) begin @(negedge clk); a_rd_en[0] = 0; end
    @(negedge clk);
    a_rd_en[0] = 0;
  endtask

  task automatic run_prf;
    logic f;
    logic [PW-1:0] oldp, expn;
    for (int a = 0; a < NARCH; a++) p_produce(a, {$urandom, $urandom});
    for (int a = 0; a < NARCH; a++) begin p_read(a, f); check(!f, "clean"); end
    // erratic bit 37 in the register of arch 5
    oldp = pmap[5];
    @(negedge clk);
    p_inj_stuck_we = 1; p_inj_addr = oldp; p_inj_mask = 65'd1 << 37; p_inj_value = ~pw(pval[oldp]);
    @(negedge clk);
    p_inj_stuck_we = 0;
    expn = '0;
    for (int i = NPHYS - 1; i >= 0; i--) if (p_free_vec[i]) expn = PW'(i);
    p_read(5, f);
    check(f && p_rec_result === REC_ERRATIC, "erratic detected");
    check(p_rec_data === pval[oldp] && p_rec_err_mask === 65'd1 << 37, "value recovered, bit located");
    check(p_rec_remapped && p_rec_rat_hit && p_rec_new_preg === expn, "remapped");
    check(p_quarantined[oldp] && p_vccmin_count == 1, "quarantined");
    pmap[5] = expn; pval[expn] = pval[oldp];
    p_read(5, f); check(!f, "remapped register reads clean");
    // soft error in arch 9
    @(negedge clk);
    p_inj_flip_we = 1; p_inj_addr = pmap[9]; p_inj_mask = 65'd1 << 64;
    @(negedge clk);
    p_inj_flip_we = 0;
    p_read(9, f);
    check(f && p_rec_result === REC_SOFT, "soft error detected");
    p_produce(9, 64'h0123_4567_89AB_CDEF);
    p_read(9, f); check(!f, "re-executed value");
    // quarantine release
    while (!p_vccmin_release) @(negedge clk);
    @(negedge clk);
    check(p_vccmin_count == 0 && p_free_vec[oldp], "released to the free list");
  endtask

  task automatic run_arf;
    logic f;
    for (int t = 0; t < NARCH; t++) a_write(t, {$urandom, $urandom});
    // tag 6 (slot 2) erratic
    @(negedge clk);
    a_inj_stuck_we = 1; a_inj_bank = 0; a_inj_addr = 6; a_inj_mask = 65'd1 << 3; a_inj_value = ~pw(aval[6]);
    @(negedge clk);
    a_inj_stuck_we = 0;
    a_read(6, f);
    check(f && a_rec_result === REC_ERRATIC && a_rec_to_spare && !a_rec_evicted, "tag 6 to spare");
    check(a_rec_data === aval[6] && a_in_spare == 16'h0040, "tag 6 in spare");
    a_read(6, f); check(!f, "tag 6 from spare");
    @(negedge clk);
    a_inj_stuck_we = 1; a_inj_addr = 6; a_inj_mask = '0;
    @(negedge clk);
    a_inj_stuck_we = 0;
    // tag 10 (slot 2) erratic: evicts tag 6
    a_inj_stuck_we = 1; a_inj_addr = 10; a_inj_mask = 65'd1 << 50; a_inj_value = ~pw(aval[10]);
    @(negedge clk);
    a_inj_stuck_we = 0;
    a_read(10, f);
    check(f && a_rec_evicted && a_rec_evict_tag == 6 && a_in_spare == 16'h0400, "tag 6 evicted");
    a_read(6, f); check(!f, "tag 6 home");
    a_read(10, f); check(!f, "tag 10 from spare");
    @(negedge clk);
    a_inj_stuck_we = 1; a_inj_addr = 10; a_inj_mask = '0;
    @(negedge clk);
    a_inj_stuck_we = 0;
    while (!a_migrating) @(negedge clk);
    while (a_stall) @(negedge clk);
    check(a_in_spare == '0, "migrated back");
    for (int t = 0; t < NARCH; t++) begin a_read(t, f); check(!f, "arf clean after migration"); end
  endtask

  initial begin
    for (int p = 0; p < NRD; p++) begin
      p_rd_en[p] = 0; p_rd_preg[p] = 0; p_lk_arch[p] = 0; a_rd_en[p] = 0; a_rd_tag[p] = 0;
    end
    for (int i = 0; i < NPHYS; i++) pval[i] = '0;
    for (int a = 0; a < NARCH; a++) pmap[a] = PW'(a);
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      run_prf();
      run_arf();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
