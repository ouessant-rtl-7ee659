// ouessant_top -- a complete Ouessant coprocessor (OCP) around a user
// accelerator.
//
// Three layers, from the system towards the accelerator:
//   * bus interface: an AHB slave (CPU access to the configuration
//     registers) and an AHB master (memory accesses), plus the bus-
//     independent core (ocp_if_core) with the ten configuration registers,
//     the bank/offset address translation and the data access control;
//   * controller (ocp_controller): fetches microcode from memory bank 0 and
//     executes mvtc / mvfc / execs / eop;
//   * the reconfigurable acceleration coprocessor (RAC) integration: NUM_IN
//     deserializing input FIFOs (32 -> 32*RATIO bits) and NUM_OUT
//     serializing output FIFOs (32*RATIO -> 32 bits).
// The accelerator itself is user defined and sits outside this module: its
// FIFO read/write ports and its start_op/end_op handshake are brought out
// as acc_* ports.
//
// Use: the CPU writes the bank base addresses (byte addresses, registers
// 0x08..0x24), the program length (0x04) and then the control register
// (0x00) with S = 1 (IE = 1 for an interrupt). The program, 32-bit
// instruction words, is read from bank 0 offset 0 onwards. When the
// program ends, D is set, S cleared and irq = IE & D raised. Writing 1 to D
// clears it.
//
// One clock (hclk) and one active-low asynchronous reset (hresetn) serve
// the whole coprocessor. The slave and master ports each have their own
// hready input so the two can sit on different ports of an interconnect;
// on a single shared bus connect both to HREADY.
//
// The three-layer organisation, the configuration register map and the
// 32/96-bit FIFO widths follow the published architecture; the AHB
// protocol details, FIFO depth and instruction encoding are this design's
// choices (see the sub-modules).
module ouessant_top
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_IN     = 1,    // input FIFOs
  parameter int unsigned NUM_OUT    = 1,    // output FIFOs
  parameter int unsigned RATIO      = 3,    // accelerator word = RATIO bus words
  parameter int unsigned FIFO_DEPTH = 256,  // accelerator words per FIFO
  localparam int unsigned ACC_W     = RATIO * DATA_W
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB slave port (configuration)
  input  logic              s_hsel,
  input  logic [ADDR_W-1:0] s_haddr,
  input  logic              s_hwrite,
  input  logic [1:0]        s_htrans,
  input  logic [2:0]        s_hsize,
  input  logic [DATA_W-1:0] s_hwdata,
  input  logic              s_hready,
  output logic              s_hreadyout,
  output logic [1:0]        s_hresp,
  output logic [DATA_W-1:0] s_hrdata,
  // AHB master port (memory)
  output logic              m_hbusreq,
  input  logic              m_hgrant,
  output logic [ADDR_W-1:0] m_haddr,
  output logic [1:0]        m_htrans,
  output logic              m_hwrite,
  output logic [2:0]        m_hsize,
  output logic [2:0]        m_hburst,
  output logic [DATA_W-1:0] m_hwdata,
  input  logic              m_hready,
  input  logic [1:0]        m_hresp,
  input  logic [DATA_W-1:0] m_hrdata,
  // interrupt to the CPU
  output logic              irq,
  // accelerator (user RAC) connections
  output logic              acc_start_op,
  input  logic              acc_end_op,
  input  logic [NUM_IN-1:0] acc_in_rd_en,
  output logic [ACC_W-1:0]  acc_in_data [NUM_IN],
  output logic [NUM_IN-1:0] acc_in_empty,
  input  logic [NUM_OUT-1:0] acc_out_wr_en,
  input  logic [ACC_W-1:0]  acc_out_data [NUM_OUT],
  output logic [NUM_OUT-1:0] acc_out_full
);
  // slave <-> configuration
  logic                 cfg_we;
  logic [REG_OFF_W-1:0] reg_offset;
  logic [DATA_W-1:0]    data_cfg_in, data_cfg_out;
  // interface core <-> controller
  logic                 start, done, busy;
  logic [DATA_W-1:0]    prog_size;
  logic [BANK_W-1:0]    bank;
  logic [OFFSET_W-1:0]  offset;
  logic                 read, write, burst, addr_ok, data_ok;
  logic [DATA_W-1:0]    data_in, data_out;
  // interface core <-> master
  logic                 m_req, m_rnw, m_burst, m_gnt, bus_ack, bus_err;
  logic [ADDR_W-1:0]    m_addr;
  logic [DATA_W-1:0]    m_wdata, m_rdata;
  // controller <-> FIFOs
  logic [NUM_IN-1:0]    in_wr_en, in_full, in_afull;
  logic [DATA_W-1:0]    in_din;
  logic [NUM_OUT-1:0]   out_rd_en, out_empty;
  logic [DATA_W-1:0]    out_dout [NUM_OUT];

  ocp_ahb_slave u_slave (
    .hclk, .hresetn,
    .hsel(s_hsel), .haddr(s_haddr), .hwrite(s_hwrite), .htrans(s_htrans),
    .hsize(s_hsize), .hwdata(s_hwdata), .hready(s_hready),
    .hreadyout(s_hreadyout), .hresp(s_hresp), .hrdata(s_hrdata),
    .cfg_we, .reg_offset, .data_cfg_in, .data_cfg_out
  );

  ocp_if_core u_if (
    .clk(hclk), .rst_n(hresetn),
    .cfg_we, .reg_offset, .data_cfg_in, .data_cfg_out,
    .start, .done, .prog_size,
    .bank, .offset, .read, .write, .burst, .addr_ok, .data_ok, .data_in, .data_out,
    .m_req, .m_rnw, .m_burst, .m_addr, .m_wdata, .m_gnt, .bus_ack, .m_rdata,
    .irq
  );

  ocp_ahb_master u_master (
    .hclk, .hresetn,
    .m_req, .m_rnw, .m_burst, .m_addr, .m_wdata, .m_gnt, .bus_ack, .bus_err, .m_rdata,
    .hbusreq(m_hbusreq), .hgrant(m_hgrant), .haddr(m_haddr), .htrans(m_htrans),
    .hwrite(m_hwrite), .hsize(m_hsize), .hburst(m_hburst), .hwdata(m_hwdata),
    .hready(m_hready), .hresp(m_hresp), .hrdata(m_hrdata)
  );

  ocp_controller #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT)) u_ctrl (
    .clk(hclk), .rst_n(hresetn),
    .start, .done, .prog_size, .busy,
    .bank, .offset, .read, .write, .burst, .addr_ok, .data_ok, .data_in, .data_out,
    .in_wr_en, .in_din, .in_full, .in_afull,
    .out_rd_en, .out_dout, .out_empty,
    .start_op(acc_start_op), .end_op(acc_end_op)
  );

  for (genvar i = 0; i < NUM_IN; i++) begin : g_in
    ocp_fifo_in #(.WORD_W(DATA_W), .RATIO(RATIO), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(hclk), .rst_n(hresetn),
      .wr_en(in_wr_en[i]), .din(in_din), .full(in_full[i]), .afull(in_afull[i]),
      .rd_en(acc_in_rd_en[i]), .dout(acc_in_data[i]), .empty(acc_in_empty[i])
    );
  end

  for (genvar i = 0; i < NUM_OUT; i++) begin : g_out
    ocp_fifo_out #(.WORD_W(DATA_W), .RATIO(RATIO), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(hclk), .rst_n(hresetn),
      .wr_en(acc_out_wr_en[i]), .din(acc_out_data[i]), .full(acc_out_full[i]),
      .rd_en(out_rd_en[i]), .dout(out_dout[i]), .empty(out_empty[i])
    );
  end
endmodule
