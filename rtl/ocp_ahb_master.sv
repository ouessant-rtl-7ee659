// ocp_ahb_master -- AMBA 2 AHB master carrying the controller's memory
// accesses, with address and data phases overlapped.
//
// Generic side, two channels:
//   request : m_req with m_rnw (read/nWrite), m_addr, m_wdata and m_burst is
//             offered until m_gnt, which is high in the cycle the address
//             phase is accepted (the request is then consumed; a new one
//             may be offered in the next cycle). m_wdata is captured at
//             that point and driven on hwdata during the data phase.
//   response: bus_ack is high for one cycle when a data phase completes;
//             m_rdata (hrdata passed through) holds the read word then.
//             Responses come back in request order, at most one data
//             phase being open at a time.
//
// Bus side: the master requests the bus with hbusreq. It owns the address
// bus after an edge where hgrant and hready were both high (AHB arbitration
// rule) until an edge with hready high and hgrant low. While it owns the
// bus and has a request it drives a NONSEQ, SINGLE, 32-bit transfer; the
// address phase of one access overlaps the data phase of the previous one,
// so back-to-back accesses stream at one word per cycle. hbusreq stays high
// after an access whose m_burst said another follows, so the bus is kept
// for a whole transfer. An ERROR response completes the access like OKAY
// and is reported on bus_err.
//
// Timing with a granted bus and no wait states: m_gnt in the cycle m_req
// is offered, bus_ack one cycle later.
//
// The bus is the AHB of the published prototype system; the protocol subset
// (pipelined single transfers, bus kept during bursts) is this design's
// choice.
module ocp_ahb_master
  import ocp_pkg::*;
(
  input  logic              hclk,
  input  logic              hresetn,
  // generic side
  input  logic              m_req,
  input  logic              m_rnw,
  input  logic              m_burst,
  input  logic [ADDR_W-1:0] m_addr,
  input  logic [DATA_W-1:0] m_wdata,
  output logic              m_gnt,
  output logic              bus_ack,
  output logic              bus_err,
  output logic [DATA_W-1:0] m_rdata,
  // AHB side
  output logic              hbusreq,
  input  logic              hgrant,
  output logic [ADDR_W-1:0] haddr,
  output logic [1:0]        htrans,
  output logic              hwrite,
  output logic [2:0]        hsize,
  output logic [2:0]        hburst,
  output logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  input  logic [1:0]        hresp,
  input  logic [DATA_W-1:0] hrdata
);
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;

  logic owner;     // this master owns the address bus
  logic hold;      // last access said more follow: keep requesting the bus
  logic dp_valid;  // a data phase of this master is open
  logic [DATA_W-1:0] wdata_q;

  wire addr_out = m_req && owner;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      owner    <= 1'b0;
      hold     <= 1'b0;
      dp_valid <= 1'b0;
      wdata_q  <= '0;
    end else begin
      if (hready) begin
        owner    <= hgrant;
        dp_valid <= addr_out;
        if (addr_out) begin
          wdata_q <= m_wdata;
          hold    <= m_burst;
        end
      end
    end
  end

  assign m_gnt   = addr_out && hready;
  assign hbusreq = m_req || hold;
  assign htrans  = addr_out ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr   = m_addr;
  assign hwrite  = !m_rnw;
  assign hsize   = 3'b010;   // 32-bit
  assign hburst  = 3'b000;   // SINGLE
  assign hwdata  = wdata_q;
  assign bus_ack = dp_valid && hready;
  assign bus_err = bus_ack && (hresp == 2'b01);
  assign m_rdata = hrdata;

  // an address phase extended by wait states keeps its address and control
  a_addr_stable: assert property (@(posedge hclk) disable iff (!hresetn)
      (htrans == HTRANS_NONSEQ && !hready) |=> (htrans == HTRANS_NONSEQ && $stable(haddr) && $stable(hwrite)));
endmodule
