// pcie_fifo: synchronous first-in first-out buffer used for the model's
// packet buffers and queues.
//
// A circular array of DEPTH words of WIDTH bits with read and write pointers
// one bit wider than the index so that full and empty are told apart.
// push/pop are qualified internally (push is ignored when full, pop when
// empty). rd_data shows the oldest word combinationally. count gives the
// occupancy. DEPTH must be a power of two. Reset empties the buffer; the array
// itself is not reset.
//
// Timing: push and pop take effect at the clock edge; rd_data shows the head
// combinationally. Origin: a generic helper of this design.
module pcie_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count   = wp - rp;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (wp == rp);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
