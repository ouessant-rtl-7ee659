// ocp_cfg_regs -- configuration registers of the coprocessor interface.
//
// Ten 32-bit registers, addressed by a 4-bit word index (reg_offset):
//   0 (0x00) ctrl     bit 0 S  start, bit 1 D done, bit 2 IE interrupt enable
//   1 (0x04) psize    number of instructions in the program
//   2..9 (0x08..0x24) bank 0..7 base address (byte address in the system)
// A configuration multiplexer returns the selected register on
// data_cfg_out; indexes 10..15 read as zero and ignore writes.
//
// Control bits: writing the ctrl register sets S and IE from the written
// data. Writing 1 to S or to D clears D (D is write-one-to-clear). The
// controller's done pulse clears S and sets D. The interrupt to the CPU is
// the level IE & D. The start output is the S bit.
//
// The bank bases go to the address translation: bank_base[i] is register
// 2+i. Writes take effect at the clock edge on which cfg_we is high;
// data_cfg_out is combinational.
//
// The register map (ten registers, their order and byte offsets, the S/IE/D
// bits, an interrupt from IE and D) follows the published interface. The bit
// positions and the set/clear rules of S and D are this design's choices.
module ocp_cfg_regs
  import ocp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // bus slave side
  input  logic                 cfg_we,
  input  logic [REG_OFF_W-1:0] reg_offset,
  input  logic [DATA_W-1:0]    data_cfg_in,
  output logic [DATA_W-1:0]    data_cfg_out,
  // controller side
  output logic                 start,
  input  logic                 done,
  output logic [DATA_W-1:0]    prog_size,
  output logic [ADDR_W-1:0]    bank_base [NUM_BANKS],
  // system
  output logic                 irq
);
  logic s_q, d_q, ie_q;
  logic [DATA_W-1:0] psize_q;
  logic [ADDR_W-1:0] bank_q [NUM_BANKS];

  wire wr_ctrl = cfg_we && (reg_offset == CFG_CTRL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= 1'b0;
      d_q     <= 1'b0;
      ie_q    <= 1'b0;
      psize_q <= '0;
      for (int i = 0; i < NUM_BANKS; i++) bank_q[i] <= '0;
    end else begin
      if (wr_ctrl) begin
        s_q  <= data_cfg_in[CTRL_S];
        ie_q <= data_cfg_in[CTRL_IE];
        if (data_cfg_in[CTRL_S] || data_cfg_in[CTRL_D]) d_q <= 1'b0;
      end
      if (done) begin
        s_q <= 1'b0;
        d_q <= 1'b1;
      end
      if (cfg_we && reg_offset == CFG_PSIZE) psize_q <= data_cfg_in;
      for (int i = 0; i < NUM_BANKS; i++) begin
        if (cfg_we && reg_offset == CFG_BANK0 + REG_OFF_W'(i)) bank_q[i] <= data_cfg_in;
      end
    end
  end

  // configuration data multiplexer
  always_comb begin
    data_cfg_out = '0;
    if (reg_offset == CFG_CTRL) begin
      data_cfg_out[CTRL_S]  = s_q;
      data_cfg_out[CTRL_D]  = d_q;
      data_cfg_out[CTRL_IE] = ie_q;
    end else if (reg_offset == CFG_PSIZE) begin
      data_cfg_out = psize_q;
    end else if (reg_offset >= CFG_BANK0 && reg_offset < CFG_BANK0 + REG_OFF_W'(NUM_BANKS)) begin
      data_cfg_out = bank_q[BANK_W'(reg_offset - CFG_BANK0)];
    end
  end

  assign start     = s_q;
  assign prog_size = psize_q;
  assign bank_base = bank_q;
  assign irq       = ie_q && d_q;
endmodule
