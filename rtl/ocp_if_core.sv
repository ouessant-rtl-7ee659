// ocp_if_core -- bus-independent part of the coprocessor interface.
//
// It holds the configuration registers (ocp_cfg_regs), translates the
// controller's internal addresses into system addresses and runs the data
// access control between the controller and the bus master.
//
// Address translation: the controller names memory as (bank, offset). The
// bank selects one of the eight bank base registers and the offset, a count
// of 32-bit words, is added to it: address = bank_base[bank] + 4*offset.
//
// Data access control: the controller offers a read or write with bank,
// offset, burst and (for writes) data_out, and keeps it offered until
// addr_ok, which is high in the cycle the bus master accepts the address.
// The access then completes with data_ok, one cycle or more later, with
// the read word on data_in. The next access may be offered as soon as the
// previous one is accepted, so addresses and data overlap and sequential
// words stream at one per cycle. burst tells the master that another
// access follows, so that it keeps the bus. The translation and the
// handshake are combinational: the controller's request reaches the bus in
// the same cycle.
//
// The split into configuration, translation and data access control, the
// 3-bit bank, 14-bit offset and the signal names follow the published
// interface; the word-granular offset and the request/acknowledge protocol
// are this design's choices.
module ocp_if_core
  import ocp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // from/to the bus slave
  input  logic                 cfg_we,
  input  logic [REG_OFF_W-1:0] reg_offset,
  input  logic [DATA_W-1:0]    data_cfg_in,
  output logic [DATA_W-1:0]    data_cfg_out,
  // from/to the controller
  output logic                 start,
  input  logic                 done,
  output logic [DATA_W-1:0]    prog_size,
  input  logic [BANK_W-1:0]    bank,
  input  logic [OFFSET_W-1:0]  offset,
  input  logic                 read,
  input  logic                 write,
  input  logic                 burst,
  output logic                 addr_ok,
  output logic                 data_ok,
  output logic [DATA_W-1:0]    data_in,
  input  logic [DATA_W-1:0]    data_out,
  // from/to the bus master
  output logic                 m_req,
  output logic                 m_rnw,
  output logic                 m_burst,
  output logic [ADDR_W-1:0]    m_addr,
  output logic [DATA_W-1:0]    m_wdata,
  input  logic                 m_gnt,
  input  logic                 bus_ack,
  input  logic [DATA_W-1:0]    m_rdata,
  // system
  output logic                 irq
);
  logic [ADDR_W-1:0] bank_base [NUM_BANKS];
  logic [ADDR_W-1:0] sys_addr;
  logic              pending;   // an accepted access has not completed yet

  ocp_cfg_regs u_cfg (
    .clk, .rst_n,
    .cfg_we, .reg_offset, .data_cfg_in, .data_cfg_out,
    .start, .done, .prog_size, .bank_base, .irq
  );

  // bank multiplexer and offset adder
  assign sys_addr = bank_base[bank] + {{(ADDR_W-OFFSET_W-2){1'b0}}, offset, 2'b00};

  // data access control
  assign m_req   = read || write;
  assign m_rnw   = read;
  assign m_burst = burst;
  assign m_addr  = sys_addr;
  assign m_wdata = data_out;
  assign addr_ok = m_gnt;
  assign data_ok = bus_ack;
  assign data_in = m_rdata;

  // track the open access to check the ordering rules
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                pending <= 1'b0;
    else if (m_gnt || bus_ack) pending <= m_gnt;
  end

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(read && write));
  a_ack_after:  assert property (@(posedge clk) disable iff (!rst_n) bus_ack |-> pending);
  a_hold_req:   assert property (@(posedge clk) disable iff (!rst_n)
                                 (m_req && !m_gnt) |=> (m_req && $stable(m_addr) && $stable(m_rnw)));
endmodule
