// ocp_fifo_in -- deserializing input FIFO between the controller and the
// accelerator (the left-hand FIFO of the RAC integration).
//
// The controller writes WORD_W-bit words (din, wr_en, full). RATIO-1 words
// are collected in a staging register; the word that completes a group is
// stored, together with the staged ones, as one RATIO*WORD_W-bit entry in
// the FIFO memory. The first word written ends up in the least significant
// bits of the entry. The accelerator sees a first-word-fall-through read
// port (dout, empty, rd_en).
//
// full is raised only when the next written word would have to enter a full
// memory, i.e. memory full and RATIO-1 words staged. afull (almost full) is
// raised when at most one more word can be taken; a writer with one word
// in flight uses it to decide whether it may request another. Words of an
// incomplete group stay staged until the group is complete.
//
// Timing: a word written at edge k that completes a group is visible on dout
// (empty low) after edge k. One word can be written and one entry read per
// cycle.
//
// The 32-bit input width and 96-bit output width (RATIO = 3) are those of
// the published example; the depth, word order and full rule are this
// design's choices.
module ocp_fifo_in #(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned RATIO  = 3,
  parameter int unsigned DEPTH  = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // controller side
  input  logic                    wr_en,
  input  logic [WORD_W-1:0]       din,
  output logic                    full,
  output logic                    afull,
  // accelerator side
  input  logic                    rd_en,
  output logic [RATIO*WORD_W-1:0] dout,
  output logic                    empty
);
  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;
  localparam int unsigned SN = (RATIO > 1) ? RATIO - 1 : 1;  // staging slots

  logic [WORD_W-1:0]       stage [SN];
  logic [CW-1:0]           fill;            // words staged
  logic                    mem_full;
  logic [$clog2(DEPTH):0]  mem_count;
  logic [31:0]             capacity;        // words that can still be written
  logic [RATIO*WORD_W-1:0] packed_word;
  wire                     last  = (fill == CW'(RATIO-1));
  wire                     do_wr = wr_en && !full;

  assign full     = mem_full && last;
  assign capacity = (DEPTH - 32'(mem_count)) * RATIO + (RATIO - 1 - 32'(fill));
  assign afull    = (capacity <= 1);

  always_comb begin
    for (int i = 0; i < RATIO; i++) begin
      packed_word[i*WORD_W +: WORD_W] = (i == RATIO-1) ? din : stage[i % SN];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      for (int i = 0; i < SN; i++) stage[i] <= '0;
    end else if (do_wr) begin
      if (last) begin
        fill <= '0;
      end else begin
        stage[32'(fill) % SN] <= din;
        fill        <= fill + 1'b1;
      end
    end
  end

  ocp_sync_fifo #(.WIDTH(RATIO*WORD_W), .DEPTH(DEPTH)) u_mem (
    .clk, .rst_n,
    .wr_en  (do_wr && last),
    .wr_data(packed_word),
    .full   (mem_full),
    .rd_en,
    .rd_data(dout),
    .empty,
    .count  (mem_count)
  );
endmodule
