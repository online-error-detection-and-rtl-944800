// Self-checking test of prf_protect (32 physical, 8 architectural registers,
// 16-bit values, 2 read ports, T = 300) against a reference model of the
// mapping and of the register contents. Covers: rename/writeback/read;
// an erratic bit on port 0 and on port 1 (recovered, moved to a new
// register, rename table redirected, old register quarantined, flush);
// a soft error (flush, no remap); a read error that is gone when the
// sequence re-reads (REC_OK, no flush); an erratic bit that disappears
// before the inverted word is written (classified as soft); dropped release
// of a quarantined register; the quarantine release after T cycles; an
// erratic bit in a register the rename table no longer points to (restored
// in place, no remap); and an
// erratic bit with no free register left (value restored in place, and
// recovered again on the next read while the cell stays stuck). Checks the
// stall length: 7 cycles (error cycle plus the 6-cycle sequence), 4 when
// the re-read is clean.
module prf_protect_tb;
  import erratic_pkg::*;
  localparam int NPHYS = 32, NARCH = 8, W = 16, NRD = 2, T = 300;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ren_req = 0, ren_grant;
  logic [2:0]    ren_arch = 0;
  logic [4:0]    ren_preg, ren_old;
  logic [2:0]    lk_arch [NRD];
  logic [4:0]    lk_preg [NRD];
  logic          rel_en = 0;
  logic [4:0]    rel_preg = 0;
  logic          wr_en = 0;
  logic [4:0]    wr_preg = 0;
  logic [W-1:0]  wr_data = 0;
  logic          rd_en [NRD];
  logic [4:0]    rd_preg [NRD];
  logic [W-1:0]  rd_data [NRD];
  logic          rd_err [NRD];
  logic          stall, flush, rec_done, rec_remapped, rec_rat_hit, vccmin_release;
  rec_result_t   rec_result;
  logic [4:0]    rec_preg, rec_new_preg;
  logic [W-1:0]  rec_data;
  logic [W:0]    rec_err_mask;
  logic [5:0]    free_count, vccmin_count;
  logic [NPHYS-1:0] free_vec, quarantined;
  logic          inj_stuck_we = 0, inj_flip_we = 0;
  logic [4:0]    inj_addr = 0;
  logic [W:0]    inj_mask = 0, inj_value = 0;

  prf_protect #(.NPHYS(NPHYS), .NARCH(NARCH), .W(W), .NRD(NRD), .T(T)) dut (.*);

  logic [W-1:0] val  [NPHYS];   // value last written to each physical register
  logic [4:0]   map  [NARCH];
  int flushes = 0;

  always @(negedge clk) if (flush) flushes++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // rename arch a to a new register, write v into it, commit (release old)
  task automatic produce(input int a, input logic [W-1:0] v);
    logic [4:0] p, old;
    @(negedge clk);
    ren_req = 1; ren_arch = 3'(a); #1;
    check(ren_grant === 1'b1, "rename granted");
    p = ren_preg; old = ren_old;
    check(old === map[a], "ren_old is the previous mapping");
    @(negedge clk);
    ren_req = 0; wr_en = 1; wr_preg = p; wr_data = v;
    @(negedge clk);
    wr_en = 0; rel_en = 1; rel_preg = old;
    @(negedge clk);
    rel_en = 0;
    map[a] = p; val[p] = v;
  endtask

  task automatic clean_read(input int port, input int a);
    @(negedge clk);
    lk_arch[port] = 3'(a); #1;
    check(lk_preg[port] === map[a], "lookup");
    rd_en[port] = 1; rd_preg[port] = lk_preg[port]; #1;
    check(rd_err[port] === 1'b0 && rd_data[port] === val[map[a]], $sformatf("clean read arch %0d", a));
    check(stall === 1'b0, "no stall on clean read");
    @(negedge clk);
    rd_en[port] = 0;
  endtask

  // read arch a on a port, expect an error, wait for the report
  // mode: 0 none, 1 undo the flip at detection (clean re-read),
  //       2 end the stuck period at detection
  task automatic faulty_read(input int port, input int a, input int mode, input logic [W:0] m,
                             output int stall_cycles);
    @(negedge clk);
    rd_en[port] = 1; rd_preg[port] = map[a]; #1;
    check(rd_err[port] === 1'b1, "parity error flagged");
    check(stall === 1'b1, "stall in the error cycle");
    if (mode == 1) begin inj_flip_we = 1; inj_addr = map[a]; inj_mask = m; end
    if (mode == 2) begin inj_stuck_we = 1; inj_addr = map[a]; inj_mask = '0; end
    stall_cycles = 0;
    while (stall && stall_cycles < 50) begin
      @(negedge clk);
      rd_en[port] = 0; inj_flip_we = 0; inj_stuck_we = 0;
      stall_cycles++;
    end
    check(rec_done === 1'b1, "rec_done after stall");
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sc, bitn;
    logic [4:0] oldp, newp;
    logic [W:0] m;
    for (int i = 0; i < NPHYS; i++) val[i] = '0;
    for (int a = 0; a < NARCH; a++) map[a] = 5'(a);
    for (int p = 0; p < NRD; p++) begin rd_en[p] = 0; rd_preg[p] = 0; lk_arch[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int a = 0; a < NARCH; a++) produce(a, 16'($urandom));
    check(free_count === 6'(NPHYS - NARCH), "free count after renames");
    for (int a = 0; a < NARCH; a++) clean_read(a % 2, a);

    // ---- erratic bit on port 0: arch 2, a bit stuck opposite to its value
    bitn = 5; oldp = map[2];
    m = 17'd1 << bitn;
    @(negedge clk);
    inj_stuck_we = 1; inj_addr = oldp; inj_mask = m; inj_value = ~{^val[oldp], val[oldp]};
    @(negedge clk);
    inj_stuck_we = 0;
    newp = '0;
    for (int i = NPHYS - 1; i >= 0; i--) if (free_vec[i]) newp = 5'(i);
   
    faulty_read(0, 2, 0, m, sc);
    check(sc == 7, $sformatf("stall lasted %0d cycles, expected 7", sc));
    check(rec_result === REC_ERRATIC, "erratic classified");
    check(rec_data === val[oldp], "recovered value");
    check(rec_err_mask === m, "faulty bit located");
    check(rec_preg === oldp && rec_new_preg === newp && rec_remapped && rec_rat_hit, "remapped to lowest free");
    check(flush === 1'b1, "flush pulsed");
    check(quarantined[oldp] && vccmin_count == 1, "old register quarantined");
    check(!free_vec[oldp] && !free_vec[newp], "neither register free");
    map[2] = newp; val[newp] = val[oldp];
    clean_read(1, 2);
    // a commit releasing the quarantined register is dropped
    @(negedge clk); rel_en = 1; rel_preg = oldp;
    @(negedge clk); rel_en = 0;
    check(!free_vec[oldp], "release of quarantined register dropped");

    // ---- erratic bit on port 1: arch 5, parity bit stuck
    oldp = map[5]; m = 17'd1 << W;
    @(negedge clk);
    inj_stuck_we = 1; inj_addr = oldp; inj_mask = m; inj_value = ~{^val[oldp], val[oldp]};
    @(negedge clk);
    inj_stuck_we = 0;
    faulty_read(1, 5, 0, m, sc);
    check(rec_result === REC_ERRATIC && rec_data === val[oldp] && rec_err_mask === m, "port 1 erratic parity bit");
    map[5] = rec_new_preg; val[rec_new_preg] = val[oldp];
    check(vccmin_count == 2, "two quarantined");
    clean_read(0, 5);

    // ---- soft error: arch 3, bit 9 flipped
    oldp = map[3]; m = 17'd1 << 9;
    @(negedge clk); inj_flip_we = 1; inj_addr = oldp; inj_mask = m;
    @(negedge clk); inj_flip_we = 0;
    faulty_read(0, 3, 0, m, sc);
    check(rec_result === REC_SOFT && !rec_remapped && rec_err_mask === '0, "soft error");
    check(flush === 1'b1 && vccmin_count == 2, "soft: flush, no quarantine");
    produce(3, 16'h1234);   // the value is regenerated by re-execution

    // ---- error gone at re-read: REC_OK, no flush
    oldp = map[4]; m = 17'd1 << 2;
    @(negedge clk); inj_flip_we = 1; inj_addr = oldp; inj_mask = m;
    @(negedge clk); inj_flip_we = 0;
    faulty_read(0, 4, 1, m, sc);
    check(sc == 4, $sformatf("clean re-read stall %0d cycles, expected 4", sc));
    check(rec_result === REC_OK && rec_data === val[oldp], "REC_OK with value");
    check(flush === 1'b0, "no flush on REC_OK");
    @(negedge clk);
    check(flushes == 3, $sformatf("%0d flush pulses, expected 3", flushes));

    // ---- erratic period ends before the write-back: classified soft
    oldp = map[6]; m = 17'd1 << 11;
    @(negedge clk);
    inj_stuck_we = 1; inj_addr = oldp; inj_mask = m; inj_value = ~{^val[oldp], val[oldp]};
    @(negedge clk); inj_stuck_we = 0;
    faulty_read(0, 6, 2, m, sc);
    check(rec_result === REC_SOFT, "vanished stuck bit seen as soft error");
    produce(6, 16'hBEEF);

    // ---- quarantine release after T cycles
    begin
      logic [NPHYS-1:0] q;
      int waitc;
      q = quarantined;
      waitc = 0;
      while (!vccmin_release && waitc < T + 5) begin @(negedge clk); waitc++; end
      check(vccmin_release === 1'b1, "quarantine released");
      @(negedge clk);
      check((free_vec & q) == q && vccmin_count == 0, "released registers are free");
    end

    // ---- erratic bit in an older version no rename-table entry points to:
    //      restored in place, no new register taken
    begin
      logic [4:0] older;
      older = map[0];
      produce(0, 16'h5A5A);   // map[0] moves on; 'older' was released at commit
      @(negedge clk); wr_en = 1; wr_preg = older; wr_data = 16'h00F0;   // in-flight reuse
      @(negedge clk); wr_en = 0; val[older] = 16'h00F0;
      @(negedge clk);
      inj_stuck_we = 1; inj_addr = older; inj_mask = 17'd1 << 4; inj_value = ~{^val[older], val[older]};
      @(negedge clk); inj_stuck_we = 0;
      @(negedge clk);
      rd_en[1] = 1; rd_preg[1] = older; #1;
      check(rd_err[1] === 1'b1, "error in unmapped register");
      while (stall || !rec_done) begin @(negedge clk); rd_en[1] = 0; end
      check(rec_result === REC_ERRATIC && rec_data === 16'h00F0, "unmapped: recovered");
      check(!rec_rat_hit && !rec_remapped && rec_new_preg === older, "unmapped: in place");
      check(!quarantined[older], "unmapped: not quarantined");
      @(negedge clk);
      inj_stuck_we = 1; inj_addr = older; inj_mask = '0;
      @(negedge clk); inj_stuck_we = 0;
    end

    // ---- no free register: recovered value written back in place
    while (free_count != 0) begin
      @(negedge clk); ren_req = 1; ren_arch = 3'd7;
      @(negedge clk); ren_req = 0;
      map[7] = ren_preg;   // allocated, no value needed
    end
    oldp = map[1]; m = 17'd1 << 0;
    @(negedge clk);
    inj_stuck_we = 1; inj_addr = oldp; inj_mask = m; inj_value = ~{^val[oldp], val[oldp]};
    @(negedge clk); inj_stuck_we = 0;
    faulty_read(0, 1, 0, m, sc);
    check(rec_result === REC_ERRATIC && !rec_remapped && rec_rat_hit && rec_new_preg === oldp, "no free: in place");
    check(vccmin_count == 0, "no free: nothing quarantined");
    // the cell is still stuck: the next read fails again and is recovered again
    faulty_read(0, 1, 0, m, sc);
    check(rec_result === REC_ERRATIC && rec_data === val[oldp], "no free: recovered again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
