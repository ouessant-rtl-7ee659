// tb_ocp_ahb_master -- self-checking test of the AHB master.
//
// Around the master: an arbiter model that grants the bus after a random
// delay once hbusreq is high (and may take it back when hbusreq falls), and
// a memory slave model with random wait states. The generic side issues
// random reads and writes, back to back or with gaps, some flagged as
// bursts. Checked: read data in request order, the final memory contents,
// that NONSEQ transfers appear only while the master owns the bus, that
// hbusreq stays high after a burst access, and that with the bus granted
// and no wait states one address is accepted per cycle with each response
// one cycle later.
module tb_ocp_ahb_master;
  import ocp_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic m_req = 0, m_rnw = 1, m_burst = 0, m_gnt, bus_ack, bus_err;
  logic [ADDR_W-1:0] m_addr = '0;
  logic [DATA_W-1:0] m_wdata = '0, m_rdata;
  logic hbusreq, hgrant = 0, hwrite, hready = 1;
  logic [ADDR_W-1:0] haddr;
  logic [1:0] htrans, hresp = 2'b00;
  logic [2:0] hsize, hburst;
  logic [DATA_W-1:0] hwdata, hrdata;
  int checks = 0, failures = 0;
  int n_wait = 0, n_grant_wait = 0;
  bit waits_on = 1, grant_delay_on = 1;

  ocp_ahb_master dut (.*);

  logic [31:0] mem [256], model [256];

  always #5 hclk = ~hclk;

  initial begin
    repeat (50000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // arbiter: grant changes only at edges with hready high
  bit owner_ref = 0;
  always @(posedge hclk) begin
    if (hready) owner_ref <= hgrant;
    if (htrans == 2'b10) check(owner_ref, "NONSEQ only while owning the bus");
    if (hbusreq && !hgrant) n_grant_wait++;
  end
  always @(negedge hclk) begin
    if (hbusreq) begin
      if (!hgrant && (!grant_delay_on || $urandom_range(0, 2) == 0)) hgrant <= 1;
    end else if (grant_delay_on && $urandom_range(0, 1) == 0) hgrant <= 0;
  end

  // memory slave with wait states
  bit dp_valid = 0, dp_write = 0;
  logic [7:0] dp_idx;
  always @(posedge hclk) begin
    if (hready) begin
      if (dp_valid && dp_write) mem[dp_idx] <= hwdata;
      dp_valid <= (htrans == 2'b10);
      dp_write <= hwrite;
      dp_idx   <= haddr[9:2];
    end
  end
  always @(negedge hclk) begin
    hready <= !(dp_valid && waits_on && $urandom_range(0, 2) == 0);
    if (!hready) n_wait++;
  end
  assign hrdata = mem[dp_idx];

  // expected responses, in request order
  typedef struct { bit rd; logic [31:0] data; } resp_t;
  resp_t pend [$];
  int n_acks = 0;

  always @(posedge hclk) begin
    if (bus_ack) begin
      n_acks++;
      if (pend.size() == 0) check(0, "response without a request");
      else begin
        if (pend[0].rd) check(m_rdata == pend[0].data, $sformatf("read %h expected %h", m_rdata, pend[0].data));
        void'(pend.pop_front());
      end
    end
  end

  // offer one request until it is accepted; the model is updated in order
  task automatic access(bit rd, int idx, bit bu);
    logic [31:0] wd = $urandom;
    resp_t r;
    @(negedge hclk);
    m_req = 1; m_rnw = rd; m_addr = 32'h4000_0000 + 32'(idx * 4); m_wdata = wd; m_burst = bu;
    do @(posedge hclk); while (!m_gnt);
    r.rd = rd;
    r.data = model[idx];
    if (!rd) model[idx] = wd;
    pend.push_back(r);
    #1;
    if (bu) check(hbusreq, "bus kept during a burst");
    m_req = 0;
  endtask

  initial begin
    int t0, t1, a0;
    for (int i = 0; i < 256; i++) begin mem[i] = $urandom; model[i] = mem[i]; end
    repeat (2) @(posedge hclk);
    hresetn = 1;
    // back-to-back requests with random gaps
    for (int n = 0; n < 2000; n++) begin
      access($urandom_range(0, 1), $urandom_range(0, 15), $urandom_range(0, 1));
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge hclk);
    end
    repeat (5) @(posedge hclk);
    check(pend.size() == 0, "every request answered");
    for (int i = 0; i < 256; i++) check(mem[i] == model[i], $sformatf("memory word %0d", i));
    check(n_wait > 0 && n_grant_wait > 0, "wait states and grant delays happened");
    // timing: granted bus, no wait states, eight requests back to back
    waits_on = 0; grant_delay_on = 0;
    access(1, 0, 1);
    repeat (3) @(posedge hclk);
    a0 = n_acks;
    @(negedge hclk);
    t0 = $time;
    for (int i = 0; i < 8; i++) begin
      m_req = 1; m_rnw = 1; m_addr = 32'h4000_0000 + 32'(i * 4); m_burst = (i != 7);
      do @(posedge hclk); while (!m_gnt);
      pend.push_back('{1'b1, model[i]});
      #1;
    end
    m_req = 0;
    t1 = $time;
    @(posedge hclk); #1;
    check((t1 - t0 + 4) / 10 == 8, $sformatf("8 addresses in %0d cycles, expected 8", (t1 - t0 + 4) / 10));
    check(n_acks - a0 == 8, "8 responses one cycle after the last address");
    $display("wait states %0d, grant waits %0d", n_wait, n_grant_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
