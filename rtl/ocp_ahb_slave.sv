// ocp_ahb_slave -- AMBA 2 AHB slave giving the CPU access to the
// coprocessor configuration registers.
//
// In the address phase of a selected transfer (hsel, htrans NONSEQ or SEQ,
// hready high) the slave records the direction and the register index,
// haddr[5:2]. In the following data phase that index drives reg_offset, a
// write presents hwdata on data_cfg_in with cfg_we high for one cycle, and a
// read returns data_cfg_out on hrdata. The slave never inserts wait states
// (hreadyout is always high) and always answers OKAY. Only 32-bit accesses
// are meant; hsize and the low address bits are not decoded.
//
// This is the bus-specific half of the interface, written for the AHB bus of
// the published prototype system. Its protocol details (zero wait states,
// word-only access) are this design's choices.
module ocp_ahb_slave
  import ocp_pkg::*;
(
  input  logic                 hclk,
  input  logic                 hresetn,
  input  logic                 hsel,
  input  logic [ADDR_W-1:0]    haddr,
  input  logic                 hwrite,
  input  logic [1:0]           htrans,
  input  logic [2:0]           hsize,
  input  logic [DATA_W-1:0]    hwdata,
  input  logic                 hready,
  output logic                 hreadyout,
  output logic [1:0]           hresp,
  output logic [DATA_W-1:0]    hrdata,
  // towards the configuration registers
  output logic                 cfg_we,
  output logic [REG_OFF_W-1:0] reg_offset,
  output logic [DATA_W-1:0]    data_cfg_in,
  input  logic [DATA_W-1:0]    data_cfg_out
);
  logic dphase_wr;   // data phase of a write is in progress

  wire addr_phase = hsel && htrans[1] && hready;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dphase_wr  <= 1'b0;
      reg_offset <= '0;
    end else if (hready) begin
      dphase_wr <= addr_phase && hwrite;
      if (addr_phase) reg_offset <= haddr[REG_OFF_W+1:2];
    end
  end

  assign cfg_we      = dphase_wr;
  assign data_cfg_in = hwdata;
  assign hrdata      = data_cfg_out;
  assign hreadyout   = 1'b1;
  assign hresp       = 2'b00;

  a_word_only: assert property (@(posedge hclk) disable iff (!hresetn)
                                addr_phase |-> (hsize == 3'b010));
endmodule
