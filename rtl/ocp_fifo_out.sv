// ocp_fifo_out -- serializing output FIFO between the accelerator and the
// controller (the right-hand FIFO of the RAC integration).
//
// The accelerator writes RATIO*WORD_W-bit entries (din, wr_en, full) into
// the FIFO memory. The head entry is moved into an unpacking register and a
// multiplexer presents its WORD_W-bit slices on dout one after the other,
// least significant slice first. The controller side is first-word-fall-
// through: dout is valid while empty is low and rd_en consumes one word.
// When the last slice is consumed the next entry, if any, is loaded in the
// same cycle, so words stream out at one per cycle.
//
// Timing: an entry written at edge k is in memory after edge k, in the
// unpacking register after edge k+1 and its first word is on dout then.
//
// The 96-bit input and 32-bit output widths (RATIO = 3) follow the published
// example; the depth and slice order are this design's choices.
module ocp_fifo_out #(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned RATIO  = 3,
  parameter int unsigned DEPTH  = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // accelerator side
  input  logic                    wr_en,
  input  logic [RATIO*WORD_W-1:0] din,
  output logic                    full,
  // controller side
  input  logic                    rd_en,
  output logic [WORD_W-1:0]       dout,
  output logic                    empty
);
  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [RATIO*WORD_W-1:0] hold;
  logic                    hold_valid;
  logic [CW-1:0]           sel;
  logic [RATIO*WORD_W-1:0] mem_dout;
  logic                    mem_empty;
  logic                    mem_pop;

  wire consume   = rd_en && hold_valid;
  wire last      = (sel == CW'(RATIO-1));
  wire hold_free = !hold_valid || (consume && last);

  assign mem_pop = hold_free && !mem_empty;
  assign empty   = !hold_valid;
  assign dout    = hold[sel*WORD_W +: WORD_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold       <= '0;
      hold_valid <= 1'b0;
      sel        <= '0;
    end else begin
      if (consume && !last) sel <= sel + 1'b1;
      if (hold_free) begin
        sel        <= '0;
        hold_valid <= !mem_empty;
        if (!mem_empty) hold <= mem_dout;
      end
    end
  end

  ocp_sync_fifo #(.WIDTH(RATIO*WORD_W), .DEPTH(DEPTH)) u_mem (
    .clk, .rst_n,
    .wr_en,
    .wr_data(din),
    .full,
    .rd_en  (mem_pop),
    .rd_data(mem_dout),
    .empty  (mem_empty),
    .count  ()
  );

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
