// Self-checking test of regfile_parity (16 x 9 bits, 2 read ports) against a
// reference array: random writes and reads, stuck-at masks that hold cells
// at their stuck value through later writes, their release, and one-shot
// bit flips. Reads are combinational and checked on both ports.
module regfile_parity_tb;
  localparam int DEPTH = 16, W = 8, NRD = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] rd_addr [NRD];
  logic [W:0] rd_word [NRD];
  logic       wr_en = 0, inj_stuck_we = 0, inj_flip_we = 0;
  logic [3:0] wr_addr = 0, inj_addr = 0;
  logic [W:0] wr_word = 0, inj_mask = 0, inj_value = 0;

  regfile_parity #(.DEPTH(DEPTH), .W(W), .NRD(NRD)) dut (.*);

  logic [W:0] model [DEPTH];
  logic [W:0] smask [DEPTH];
  logic [W:0] sval  [DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all;
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr[0] = 4'(a); rd_addr[1] = 4'(DEPTH - 1 - a); #1;
      checks++;
      if (rd_word[0] !== model[a]) begin failures++; $display("FAIL p0 [%0d]=%h exp %h", a, rd_word[0], model[a]); end
      checks++;
      if (rd_word[1] !== model[DEPTH - 1 - a]) begin failures++; $display("FAIL p1 [%0d]", DEPTH - 1 - a); end
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin model[a] = '0; smask[a] = '0; sval[a] = '0; end
    rd_addr[0] = 0; rd_addr[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int it = 0; it < 300; it++) begin
      int op;
      op = $urandom_range(0, 9);
      @(negedge clk);
      wr_en = 0; inj_stuck_we = 0; inj_flip_we = 0;
      if (op < 6) begin
        wr_en = 1; wr_addr = 4'($urandom); wr_word = 9'($urandom);
        model[wr_addr] = (wr_word & ~smask[wr_addr]) | (sval[wr_addr] & smask[wr_addr]);
      end else if (op < 8) begin
        inj_stuck_we = 1; inj_addr = 4'($urandom);
        inj_mask = (op == 6) ? (9'd1 << $urandom_range(0, W)) : '0;
        inj_value = 9'($urandom);
        smask[inj_addr] = inj_mask; sval[inj_addr] = inj_value;
        model[inj_addr] = (model[inj_addr] & ~inj_mask) | (inj_value & inj_mask);
      end else begin
        inj_flip_we = 1; inj_addr = 4'($urandom); inj_mask = 9'd1 << $urandom_range(0, W);
        model[inj_addr] = model[inj_addr] ^ inj_mask;
      end
      @(negedge clk);
      wr_en = 0; inj_stuck_we = 0; inj_flip_we = 0;
      if (it % 10 == 0) check_all();
      else begin
        rd_addr[0] = 4'($urandom); rd_addr[1] = 4'($urandom); #1;
        checks++;
        if (rd_word[0] !== model[rd_addr[0]] || rd_word[1] !== model[rd_addr[1]]) begin
          failures++; $display("FAIL random read");
        end
      end
    end
    // the worked example: bit 3 stuck at 1, write the original and its inverse
    @(negedge clk);
    inj_stuck_we = 1; inj_addr = 4'd5; inj_mask = 9'b0_0000_1000; inj_value = 9'h1FF;
    @(negedge clk);
    inj_stuck_we = 0; wr_en = 1; wr_addr = 4'd5; wr_word = 9'b0_0011_0011;
    @(negedge clk);
    wr_en = 0; rd_addr[0] = 4'd5; #1;
    checks++; if (rd_word[0] !== 9'b0_0011_1011) begin failures++; $display("FAIL stuck A %b", rd_word[0]); end
    wr_en = 1; wr_word = 9'b1_1100_0100;
    @(negedge clk);
    wr_en = 0; #1;
    checks++; if (rd_word[0] !== 9'b1_1100_1100) begin failures++; $display("FAIL stuck C %b", rd_word[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
