// pcie_commit_fifo: FIFO whose writes become visible only when committed.
//
// Words are written speculatively at wp; the reader sees only words up to the
// committed pointer cp. commit publishes everything written so far (including
// a word pushed in the same cycle); rewind throws away the uncommitted words
// (a push in the same cycle is thrown away too). This is how a receiver drops
// a packet whose CRC turns out bad after its words have been stored. free
// counts the words that can still be written. DEPTH must be a power of two.
//
// Timing: push, commit, rewind and pop take effect at the clock edge; rd_data
// is the committed head, combinationally. Origin: a helper of this design
// (the reference only asks that damaged packets never reach the layer above).
module pcie_commit_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             commit,
  input  logic             rewind,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      free
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, cp, rp;
  logic do_push;

  assign free    = (AW+1)'(DEPTH) - (wp - rp);
  assign do_push = push && (free != '0);
  assign empty   = (cp == rp);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      cp <= '0;
      rp <= '0;
    end else begin
      if (rewind) wp <= cp;
      else if (do_push) wp <= wp + 1'b1;
      if (commit && !rewind) cp <= do_push ? wp + 1'b1 : wp;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
