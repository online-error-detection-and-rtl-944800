// Self-checking test of arf_spare (8 architectural registers, 2 spare
// registers, 16-bit values, 2 read ports, T = 400) against a reference model
// of the register values and of the in-spare bit vector. Covers: a register
// with an erratic bit moving into its empty spare slot; writes and reads
// following it there; a second register of the same slot evicting the first
// back to the normal file; a faulty spare entry sending its register back;
// a soft error; and the periodic migration of all spare residents back to
// the normal file.
module arf_spare_tb;
  import erratic_pkg::*;
  localparam int NARCH = 8, NSPARE = 2, W = 16, NRD = 2, T = 400;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en = 0;
  logic [2:0]    wr_tag = 0;
  logic [W-1:0]  wr_data = 0;
  logic          rd_en [NRD];
  logic [2:0]    rd_tag [NRD];
  logic [W-1:0]  rd_data [NRD];
  logic          rd_bank [NRD];
  logic          rd_err [NRD];
  logic          stall, flush, rec_done, rec_to_spare, rec_evicted, migrating;
  rec_result_t   rec_result;
  logic [2:0]    rec_tag, rec_evict_tag;
  logic [W-1:0]  rec_data;
  logic [W:0]    rec_err_mask;
  logic [NARCH-1:0] in_spare;
  logic          inj_stuck_we = 0, inj_flip_we = 0, inj_bank = 0;
  logic [2:0]    inj_addr = 0;
  logic [W:0]    inj_mask = 0, inj_value = 0;

  arf_spare #(.NARCH(NARCH), .NSPARE(NSPARE), .W(W), .NRD(NRD), .T(T)) dut (.*);

  logic [W-1:0]     val [NARCH];
  logic [NARCH-1:0] spare_model;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write(input int t, input logic [W-1:0] v);
    @(negedge clk);
    wr_en = 1; wr_tag = 3'(t); wr_data = v;
    @(negedge clk);
    wr_en = 0;
    val[t] = v;
  endtask

  task automatic clean_read(input int port, input int t);
    @(negedge clk);
    rd_en[port] = 1; rd_tag[port] = 3'(t); #1;
    check(rd_err[port] === 1'b0 && rd_data[port] === val[t], $sformatf("clean read tag %0d", t));
    check(rd_bank[port] === spare_model[t], $sformatf("bank of tag %0d", t));
    @(negedge clk);
    rd_en[port] = 0;
  endtask

  task automatic stick(input logic bank, input int t, input int bitn, input logic [W:0] cur);
    @(negedge clk);
    inj_stuck_we = 1; inj_bank = bank; inj_addr = 3'(t);
    inj_mask = 17'd1 << bitn; inj_value = ~cur;
    @(negedge clk);
    inj_stuck_we = 0;
  endtask

  task automatic unstick(input logic bank, input int t);
    @(negedge clk);
    inj_stuck_we = 1; inj_bank = bank; inj_addr = 3'(t); inj_mask = '0;
    @(negedge clk);
    inj_stuck_we = 0;
  endtask

  task automatic faulty_read(input int port, input int t);
    int n;
    @(negedge clk);
    rd_en[port] = 1; rd_tag[port] = 3'(t); #1;
    check(rd_err[port] === 1'b1 && stall === 1'b1, $sformatf("error on tag %0d", t));
    n = 0;
    while (stall && n < 50) begin @(negedge clk); rd_en[port] = 0; n++; end
    check(n == 7, $sformatf("stall %0d cycles, expected 7", n));
    check(rec_done === 1'b1 && rec_tag === 3'(t), "report");
  endtask

  function automatic logic [W:0] pw(input logic [W-1:0] v);
    return {^v, v};
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NRD; p++) begin rd_en[p] = 0; rd_tag[p] = 0; end
    spare_model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NARCH; t++) write(t, 16'($urandom));
    for (int t = 0; t < NARCH; t++) clean_read(t % 2, t);

    // tag 2: erratic bit, slot 0 empty -> moves to the spare file
    stick(0, 2, 4, pw(val[2]));
    faulty_read(0, 2);
    check(rec_result === REC_ERRATIC && rec_data === val[2] && rec_to_spare && !rec_evicted, "tag 2 to spare");
    check(flush === 1'b1, "flush on erratic");
    spare_model[2] = 1;
    check(in_spare === spare_model, "bit vector after tag 2");
    clean_read(1, 2);
    write(2, 16'hCAFE);
    clean_read(0, 2);

    // tag 4 shares slot 0: tag 2 is evicted back to the normal file
    unstick(0, 2);
    stick(0, 4, 15, pw(val[4]));
    faulty_read(1, 4);
    check(rec_result === REC_ERRATIC && rec_data === val[4] && rec_to_spare, "tag 4 to spare");
    check(rec_evicted && rec_evict_tag === 3'd2, "tag 2 evicted");
    spare_model[2] = 0; spare_model[4] = 1;
    check(in_spare === spare_model, "bit vector after eviction");
    clean_read(0, 2);
    clean_read(1, 4);

    // the spare entry of slot 0 itself becomes faulty: tag 4 goes home
    unstick(0, 4);
    stick(1, 0, 16, pw(val[4]));
    faulty_read(0, 4);
    check(rec_result === REC_ERRATIC && rec_data === val[4] && !rec_to_spare, "faulty spare entry");
    spare_model[4] = 0;
    check(in_spare === spare_model, "bit vector after faulty spare");
    clean_read(0, 4);
    unstick(1, 0);

    // soft error on tag 6
    @(negedge clk); inj_flip_we = 1; inj_bank = 0; inj_addr = 3'd6; inj_mask = 17'd1 << 7;
    @(negedge clk); inj_flip_we = 0;
    faulty_read(0, 6);
    check(rec_result === REC_SOFT && rec_err_mask === '0 && flush === 1'b1, "soft error");
    check(in_spare === spare_model, "soft error leaves the bit vector");
    write(6, 16'h0F0F);

    // tags 3 and 0 into the spare file, then the periodic migration
    stick(0, 3, 1, pw(val[3]));
    faulty_read(0, 3);
    spare_model[3] = 1;
    stick(0, 0, 9, pw(val[0]));
    faulty_read(1, 0);
    spare_model[0] = 1;
    check(in_spare === spare_model, "two in spare");
    unstick(0, 3); unstick(0, 0);
    write(3, 16'h3333);
    begin
      int n, mig;
      n = 0; mig = 0;
      while (in_spare != '0 && n < T + 20) begin
        @(negedge clk); n++;
        if (migrating) mig++;
      end
      check(mig == 2, $sformatf("migration took %0d cycles, expected 2", mig));
      spare_model = '0;
    end
    check(in_spare === '0, "all migrated");
    for (int t = 0; t < NARCH; t++) clean_read(t % 2, t);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
