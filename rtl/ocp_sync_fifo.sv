// ocp_sync_fifo -- single-clock first-word-fall-through FIFO memory.
//
// This is the storage shared by the input and output FIFOs of the
// accelerator integration. Entries are WIDTH bits; DEPTH must be a power of
// two. The head entry is visible on rd_data whenever empty is low, and
// rd_en pops it at the clock edge. wr_en pushes wr_data at the clock edge.
// Pushing while full or popping while empty is ignored (and flagged by an
// assertion). The storage is a plain array so that an FPGA tool can map it
// to block or distributed RAM; the depth is this design's choice.
module ocp_sync_fifo #(
  parameter int unsigned WIDTH = 96,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW:0] wr_ptr, rd_ptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign count   = wr_ptr - rd_ptr;
  assign full    = (count == (PW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr[PW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[PW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert ((1 << PW) == DEPTH) else $error("DEPTH must be a power of two");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
