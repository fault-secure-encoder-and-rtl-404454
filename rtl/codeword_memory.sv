// codeword_memory: storage array of encoded words for the fault-tolerant
// memory system.
//
// DEPTH words of WIDTH bits with one synchronous port: when en is high a
// write stores wdata at addr (we = 1) or a read loads mem[addr] into rdata
// (we = 0), valid the next cycle and held until the next read. Words are
// kept only in encoded form; all correction happens outside.
//
// Stored bits in a dense nanoscale memory suffer transient upsets that
// accumulate over time. The upset port (upset_en, upset_addr, upset_mask)
// flips the chosen bits of one stored word to emulate such an upset; tie
// upset_en low in normal use. If an upset and a write hit the same word in
// the same cycle, the write wins.
//
// The document does not give a word count or the cell technology: a plain
// array with DEPTH = 1024 is this design's choice.
module codeword_memory #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 15,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  input  logic             upset_en,
  input  logic [AW-1:0]    upset_addr,
  input  logic [WIDTH-1:0] upset_mask
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (upset_en) mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (en && we) mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
  end

endmodule
