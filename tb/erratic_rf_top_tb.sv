// End-to-end test of erratic_rf_top at reduced size (32 physical and 8
// architectural registers, 2 spares, 16-bit values, T = 500 cycles).
//
// Physical side: a simple in-order driver renames, writes back, commits and
// reads through the rename table, while random erratic (stuck-at) bits and
// soft errors are injected into the cells; stuck bits come and go. Each read
// is compared with a reference model of every register's value; each
// recovery is checked (recovered value, faulty-bit mask, new mapping).
// Architectural side: random writes and reads of the 8 registers with the
// same kinds of faults injected into whichever bank holds them; each
// recovery and the bank bit vector are checked against a model.
// Every mechanism is counted and one that never happened is a failure:
// renames, clean reads, erratic recovery with remap and quarantine, soft
// errors, clean re-reads, quarantine releases; moves into a spare, evictions,
// faulty spare entries, migrations.
module erratic_rf_top_tb;
  import erratic_pkg::*;
  localparam int NPHYS = 32, NARCH = 8, NSPARE = 2, W = 16, NRD = 2, T = 500;
  localparam int ITER = 1500;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT signals ----------------
  logic p_ren_req = 0, p_ren_grant;
  logic [2:0] p_ren_arch = 0;
  logic [4:0] p_ren_preg, p_ren_old;
  logic [2:0] p_lk_arch [NRD];
  logic [4:0] p_lk_preg [NRD];
  logic p_rel_en = 0; logic [4:0] p_rel_preg = 0;
  logic p_wr_en = 0; logic [4:0] p_wr_preg = 0; logic [W-1:0] p_wr_data = 0;
  logic p_rd_en [NRD]; logic [4:0] p_rd_preg [NRD];
  logic [W-1:0] p_rd_data [NRD]; logic p_rd_err [NRD];
  logic p_stall, p_flush, p_rec_done, p_rec_remapped, p_rec_rat_hit, p_vccmin_release;
  rec_result_t p_rec_result;
  logic [4:0] p_rec_preg, p_rec_new_preg;
  logic [W-1:0] p_rec_data; logic [W:0] p_rec_err_mask;
  logic [5:0] p_free_count, p_vccmin_count;
  logic [NPHYS-1:0] p_free_vec, p_quarantined;
  logic p_inj_stuck_we = 0, p_inj_flip_we = 0;
  logic [4:0] p_inj_addr = 0; logic [W:0] p_inj_mask = 0, p_inj_value = 0;

  logic a_wr_en = 0; logic [2:0] a_wr_tag = 0; logic [W-1:0] a_wr_data = 0;
  logic a_rd_en [NRD]; logic [2:0] a_rd_tag [NRD];
  logic [W-1:0] a_rd_data [NRD]; logic a_rd_bank [NRD]; logic a_rd_err [NRD];
  logic a_stall, a_flush, a_rec_done, a_rec_to_spare, a_rec_evicted, a_migrating;
  rec_result_t a_rec_result;
  logic [2:0] a_rec_tag, a_rec_evict_tag;
  logic [W-1:0] a_rec_data; logic [W:0] a_rec_err_mask;
  logic [NARCH-1:0] a_in_spare;
  logic a_inj_stuck_we = 0, a_inj_flip_we = 0, a_inj_bank = 0;
  logic [2:0] a_inj_addr = 0; logic [W:0] a_inj_mask = 0, a_inj_value = 0;

  erratic_rf_top #(.NPHYS(NPHYS), .NARCH(NARCH), .NSPARE(NSPARE), .W(W), .NRD(NRD), .T(T)) dut (.*);

  // ---------------- bookkeeping ----------------
  int n_rename, n_clean_read, n_p_erratic, n_p_soft, n_p_ok, n_p_release, n_p_inplace;
  int n_a_write, n_a_read, n_a_spare, n_a_evict, n_a_home, n_a_soft, n_a_migrate;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [W:0] pw(input logic [W-1:0] v);
    return {^v, v};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (p_vccmin_release && p_quarantined == '0) n_p_release++;
    if (a_migrating) n_a_migrate++;
  end

  // ================= physical register file =================
  logic [W-1:0] pval  [NPHYS];
  logic [W:0]   psm   [NPHYS];   // stuck mask of each register's cells
  logic [4:0]   pmap  [NARCH];

  task automatic p_produce(input int a, input logic [W-1:0] v);
    logic [4:0] p, old;
    @(negedge clk);
    p_ren_req = 1; p_ren_arch = 3'(a); #1;
    // all free registers may sit in quarantine: wait for the release
    for (int w = 0; w < T + 10 && !p_ren_grant; w++) begin @(negedge clk); #1; end
    check(p_ren_grant === 1'b1, "rename granted");
    p = p_ren_preg; old = p_ren_old;
    check(old === pmap[a], "rename reports the old mapping");
    @(negedge clk);
    p_ren_req = 0; p_wr_en = 1; p_wr_preg = p; p_wr_data = v;
    @(negedge clk);
    p_wr_en = 0; p_rel_en = 1; p_rel_preg = old;
    @(negedge clk);
    p_rel_en = 0;
    pmap[a] = p; pval[p] = v;
    n_rename++;
  endtask

  // read arch a; on an error follow the recovery and keep the model in step
  task automatic p_read(input int a, input int port, input logic undo_flip, input logic [W:0] m);
    logic [4:0] p;
    @(negedge clk);
    p_lk_arch[port] = 3'(a); #1;
    check(p_lk_preg[port] === pmap[a], "lookup follows the model");
    p = p_lk_preg[port];
    p_rd_en[port] = 1; p_rd_preg[port] = p; #1;
    if (!p_rd_err[port]) begin
      check(p_rd_data[port] === pval[p], $sformatf("read preg %0d", p));
      n_clean_read++;
      @(negedge clk);
      p_rd_en[port] = 0;
      return;
    end
    if (undo_flip) begin p_inj_flip_we = 1; p_inj_addr = p; p_inj_mask = m; end
    while (p_stall) begin @(negedge clk); p_rd_en[port] = 0; p_inj_flip_we = 0; end
    check(p_rec_done === 1'b1 && p_rec_preg === p, "recovery report");
    case (p_rec_result)
      REC_ERRATIC: begin
        check(psm[p] != '0, "erratic only where a cell is stuck");
        check(p_rec_data === pval[p] && p_rec_err_mask === psm[p], "erratic: value and bit");
        check(p_flush, "erratic: flush");
        if (p_rec_remapped) begin
          check(p_quarantined[p], "erratic: quarantined");
          pmap[a] = p_rec_new_preg; pval[p_rec_new_preg] = pval[p];
          n_p_erratic++;
        end else begin
          // no free register: the value is restored in place
          check((p_free_count == 0 || !p_rec_rat_hit) && p_rec_new_preg === p, "in-place only when nothing is free or unmapped");
          n_p_inplace++;
        end
      end
      REC_SOFT: begin
        check(psm[p] == '0 && p_flush, "soft error on healthy cells");
        n_p_soft++;
        p_produce(a, 16'($urandom));   // re-execution regenerates the value
      end
      REC_OK: begin
        check(undo_flip && p_rec_data === pval[p] && !p_flush, "clean re-read");
        n_p_ok++;
      end
      default: check(1'b0, "no result");
    endcase
  endtask

  task automatic p_inject(input logic stuck, input logic [4:0] p, input logic [W:0] m, input logic [W:0] v);
    @(negedge clk);
    if (stuck) begin p_inj_stuck_we = 1; psm[p] = m; end
    else p_inj_flip_we = 1;
    p_inj_addr = p; p_inj_mask = m; p_inj_value = v;
    @(negedge clk);
    p_inj_stuck_we = 0; p_inj_flip_we = 0;
  endtask

  task automatic run_prf;
    for (int i = 0; i < NPHYS; i++) begin pval[i] = '0; psm[i] = '0; end
    for (int a = 0; a < NARCH; a++) pmap[a] = 5'(a);
    for (int a = 0; a < NARCH; a++) p_produce(a, 16'($urandom));
    for (int it = 0; it < ITER; it++) begin
      int op, a, port;
      logic [4:0] p;
      logic [W:0] m;
      op = $urandom_range(0, 99);
      a = $urandom_range(0, NARCH - 1);
      port = $urandom_range(0, NRD - 1);
      p = pmap[a];
      m = 17'd1 << $urandom_range(0, W);
      if (op < 30) p_produce(a, 16'($urandom));
      else if (op < 60) p_read(a, port, 1'b0, '0);
      else if (op < 72) begin
        // erratic bit opposite to the stored value
        if (psm[p] == '0) p_inject(1'b1, p, m, ~pw(pval[p]));
        p_read(a, port, 1'b0, '0);
      end else if (op < 80) begin
        if (psm[p] == '0) begin p_inject(1'b0, p, m, '0); p_read(a, port, 1'b0, '0); end
      end else if (op < 86) begin
        if (psm[p] == '0) begin p_inject(1'b0, p, m, '0); p_read(a, port, 1'b1, m); end
      end else begin
        // the erratic period of this register ends; a read then clears any
        // bit it left wrong, so later faults stay single-bit
        if (psm[p] != '0) begin
          p_inject(1'b1, p, '0, '0);
          psm[p] = '0;
          p_read(a, port, 1'b0, '0);
        end
      end
    end
  endtask

  // ================= architectural register file =================
  logic [W-1:0]     aval [NARCH];
  logic [W:0]       nsm  [NARCH];    // stuck masks, normal file
  logic [W:0]       ssm  [NSPARE];   // stuck masks, spare file
  logic [NARCH-1:0] amodel;

  task automatic a_idle;
    @(negedge clk);
    while (a_stall) @(negedge clk);
    if (a_in_spare == '0) amodel = '0;   // after a migration
  endtask

  task automatic a_write(input int t, input logic [W-1:0] v);
    a_idle();
    a_wr_en = 1; a_wr_tag = 3'(t); a_wr_data = v;
    @(negedge clk);
    a_wr_en = 0;
    aval[t] = v;
    n_a_write++;
  endtask

  task automatic a_read(input int t, input int port);
    logic bank;
    a_idle();
    check(a_in_spare === amodel, "bank bit vector");
    a_rd_en[port] = 1; a_rd_tag[port] = 3'(t); #1;
    bank = a_rd_bank[port];
    check(bank === amodel[t], "bank of a read");
    if (!a_rd_err[port]) begin
      check(a_rd_data[port] === aval[t], $sformatf("read tag %0d", t));
      n_a_read++;
      @(negedge clk);
      a_rd_en[port] = 0;
      return;
    end
    begin
      logic seen;
      seen = 1'b0;
      while (a_stall) begin
        @(negedge clk); a_rd_en[port] = 0;
        if (a_rec_done) seen = 1'b1;   // a migration may follow right away
      end
      check(seen && a_rec_tag === 3'(t), "arf recovery report");
    end
    if (a_rec_result == REC_ERRATIC) begin
      check(a_rec_data === aval[t], "arf recovered value");
      check(a_rec_err_mask === (bank ? ssm[t % NSPARE] : nsm[t]), "arf faulty bit");
      if (bank) begin
        check(!a_rec_to_spare, "faulty spare sends the register home");
        amodel[t] = 0;
        n_a_home++;
      end else begin
        int owner;
        owner = -1;
        for (int j = 0; j < NARCH; j++) if (amodel[j] && j % NSPARE == t % NSPARE) owner = j;
        check(a_rec_to_spare && a_rec_evicted == (owner >= 0), "move to spare");
        if (owner >= 0) begin
          check(a_rec_evict_tag === 3'(owner), "evicted owner");
          amodel[owner] = 0;
          n_a_evict++;
        end
        amodel[t] = 1;
        n_a_spare++;
      end
    end else begin
      check(a_rec_result === REC_SOFT, "arf soft error");
      n_a_soft++;
      @(negedge clk);
      a_write(t, 16'($urandom));
    end
  endtask

  // A value that crosses two stuck words before it is read carries a double
  // error, which parity cannot see. To stay within single errors a stuck
  // spare slot is short-lived here: its erratic period ends as soon as the
  // register in it has been recovered and sent home.
  function automatic logic can_stick(input logic inspare, input int t);
    if (inspare) return ssm[t % NSPARE] == '0;
    return nsm[t] == '0 && ssm[t % NSPARE] == '0;
  endfunction

  task automatic run_arf;
    for (int t = 0; t < NARCH; t++) begin aval[t] = '0; nsm[t] = '0; end
    for (int s = 0; s < NSPARE; s++) ssm[s] = '0;
    amodel = '0;
    for (int t = 0; t < NARCH; t++) a_write(t, 16'($urandom));
    for (int it = 0; it < ITER; it++) begin
      int op, t, port;
      logic [W:0] m;
      logic inspare;
      op = $urandom_range(0, 99);
      t = $urandom_range(0, NARCH - 1);
      port = $urandom_range(0, NRD - 1);
      m = 17'd1 << $urandom_range(0, W);
      if (op < 30) a_write(t, 16'($urandom));
      else if (op < 60) a_read(t, port);
      else if (op < 85) begin
        a_idle();
        inspare = amodel[t];
        if (can_stick(inspare, t)) begin
          a_inj_stuck_we = 1; a_inj_bank = inspare; a_inj_addr = 3'(t);
          a_inj_mask = m; a_inj_value = ~pw(aval[t]);
          if (inspare) ssm[t % NSPARE] = m; else nsm[t] = m;
          @(negedge clk);
          a_inj_stuck_we = 0;
        end
        a_read(t, port);
        if (ssm[t % NSPARE] != '0) begin
          a_idle();
          a_inj_stuck_we = 1; a_inj_bank = 1'b1; a_inj_addr = 3'(t); a_inj_mask = '0;
          ssm[t % NSPARE] = '0;
          @(negedge clk);
          a_inj_stuck_we = 0;
        end
      end else if (op < 92) begin
        a_idle();
        inspare = amodel[t];
        if ((inspare ? ssm[t % NSPARE] : nsm[t]) == '0) begin
          a_inj_flip_we = 1; a_inj_bank = inspare; a_inj_addr = 3'(t); a_inj_mask = m;
          @(negedge clk);
          a_inj_flip_we = 0;
          a_read(t, port);
        end
      end else begin
        // the erratic period of one location ends; a read of the register
        // held there clears any bit it left wrong
        a_idle();
        inspare = $urandom_range(0, 1);
        a_inj_stuck_we = 1; a_inj_bank = inspare; a_inj_addr = 3'(t); a_inj_mask = '0;
        if (inspare) ssm[t % NSPARE] = '0; else nsm[t] = '0;
        @(negedge clk);
        a_inj_stuck_we = 0;
        for (int j = 0; j < NARCH; j++)
          if (inspare ? (amodel[j] && j % NSPARE == t % NSPARE) : (!amodel[j] && j == t))
            a_read(j, port);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NRD; p++) begin
      p_rd_en[p] = 0; p_rd_preg[p] = 0; p_lk_arch[p] = 0; a_rd_en[p] = 0; a_rd_tag[p] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      run_prf();
      run_arf();
    join
    $display("COUNT prf: renames=%0d clean_reads=%0d erratic=%0d soft=%0d clean_reread=%0d releases=%0d in_place=%0d",
             n_rename, n_clean_read, n_p_erratic, n_p_soft, n_p_ok, n_p_release, n_p_inplace);
    $display("COUNT arf: writes=%0d clean_reads=%0d to_spare=%0d evictions=%0d spare_faulty=%0d soft=%0d migration_cycles=%0d",
             n_a_write, n_a_read, n_a_spare, n_a_evict, n_a_home, n_a_soft, n_a_migrate);
    check(n_rename > 0, "renames happened");
    check(n_clean_read > 0, "clean reads happened");
    check(n_p_erratic > 0, "erratic recovery happened");
    check(n_p_soft > 0, "soft error happened");
    check(n_p_ok > 0, "clean re-read happened");
    check(n_p_release > 0, "quarantine release happened");
    check(n_a_write > 0 && n_a_read > 0, "arf traffic happened");
    check(n_a_spare > 0, "move to spare happened");
    check(n_a_evict > 0, "eviction happened");
    check(n_a_home > 0, "faulty spare entry happened");
    check(n_a_soft > 0, "arf soft error happened");
    check(n_a_migrate > 0, "migration happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
