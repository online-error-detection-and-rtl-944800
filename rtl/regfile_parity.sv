// Parity-protected register file with an erratic-bit cell model.
//
// Each entry stores a (W+1)-bit word: the value and its parity bit, written
// and read as one raw word. The file neither generates nor checks parity, so
// the recovery sequence can write an inverted word (parity bit included) back
// unchanged. Reads are asynchronous (combinational) on NRD ports; there is one
// synchronous write port.
//
// Fault model. The storage cells model the two fault kinds the protection
// scheme tells apart, through injection inputs that a real array would tie
// to zero:
//   * erratic (stuck-at) bits: inj_stuck_we sets, for entry inj_addr, a mask
//     of cells and the value they are stuck at. While a cell is stuck, writes
//     leave it at its stuck value and a read returns that value. Writing a
//     zero mask ends the erratic period; the cell then keeps its last content.
//   * soft errors: inj_flip_we XORs inj_mask into the stored word of entry
//     inj_addr once; the cells keep working normally afterwards.
// The stuck behaviour is applied when the word is stored (on writes and when
// a stuck mask is set), so what is read is what the cells hold. Injection
// takes priority over a write to the same entry in the same cycle.
// The entry count follows the evaluated core (128 integer registers); the
// width, port counts and the injection interface are this design's choices.
module regfile_parity #(
  parameter int unsigned DEPTH = 128,    // entries
  parameter int unsigned W     = 64,     // value width, parity excluded
  parameter int unsigned NRD   = 2,      // read ports
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // read ports, combinational
  input  logic [AW-1:0]     rd_addr [NRD],
  output logic [W:0]        rd_word [NRD],
  // write port
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [W:0]        wr_word,
  // fault injection (tie to zero in a real array)
  input  logic              inj_stuck_we,
  input  logic              inj_flip_we,
  input  logic [AW-1:0]     inj_addr,
  input  logic [W:0]        inj_mask,
  input  logic [W:0]        inj_value
);

  logic [W:0] mem        [DEPTH];
  logic [W:0] stuck_mask [DEPTH];
  logic [W:0] stuck_val  [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        mem[i]        <= '0;
        stuck_mask[i] <= '0;
        stuck_val[i]  <= '0;
      end
    end else begin
      if (wr_en)
        mem[wr_addr] <= (wr_word & ~stuck_mask[wr_addr]) |
                        (stuck_val[wr_addr] & stuck_mask[wr_addr]);
      if (inj_stuck_we) begin
        stuck_mask[inj_addr] <= inj_mask;
        stuck_val[inj_addr]  <= inj_value;
        mem[inj_addr]        <= (mem[inj_addr] & ~inj_mask) | (inj_value & inj_mask);
      end else if (inj_flip_we) begin
        mem[inj_addr] <= mem[inj_addr] ^ inj_mask;
      end
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rd_word[p] = mem[rd_addr[p]];

endmodule
