// tb_ocp_if_core -- self-checking test of the bus-independent interface.
//
// The eight bank bases are written through the configuration port, then
// random reads and writes are requested on the controller side. A small
// model of the bus master accepts each address and then completes it after
// random delays. Checked: the system address (bank base + 4 * offset), the
// direction, write data and burst flag reaching the master in the same
// cycle, addr_ok with the master's grant, data_ok with bus_ack and the read
// word, and the interrupt output of the configuration registers.
module tb_ocp_if_core;
  import ocp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [REG_OFF_W-1:0] reg_offset = '0;
  logic [DATA_W-1:0] data_cfg_in = '0, data_cfg_out;
  logic start, done = 0, irq;
  logic [DATA_W-1:0] prog_size;
  logic [BANK_W-1:0] bank = '0;
  logic [OFFSET_W-1:0] offset = '0;
  logic read = 0, write = 0, burst = 0, addr_ok, data_ok;
  logic [DATA_W-1:0] data_in, data_out = '0;
  logic m_req, m_rnw, m_burst, m_gnt = 0, bus_ack = 0;
  logic [ADDR_W-1:0] m_addr;
  logic [DATA_W-1:0] m_wdata, m_rdata = '0;
  logic [ADDR_W-1:0] base [NUM_BANKS];
  int checks = 0, failures = 0;

  ocp_if_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cfg_write(int idx, logic [31:0] v);
    cfg_we = 1; reg_offset = REG_OFF_W'(idx); data_cfg_in = v;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  // one access from the controller side: the bus master model accepts the
  // address after 'la' cycles and completes it 'ld' cycles after that
  task automatic access(bit rd, logic [BANK_W-1:0] b, logic [OFFSET_W-1:0] o,
                        logic [31:0] wd, bit bu, int la, int ld);
    logic [ADDR_W-1:0] exp_addr;
    logic [31:0] rword;
    exp_addr = base[b] + 32'(o) * 4;
    rword = $urandom;
    bank = b; offset = o; read = rd; write = !rd; data_out = wd; burst = bu;
    #1;
    repeat (la + 1) begin
      check(m_req, "request reaches the bus master in the same cycle");
      check(m_addr == exp_addr, $sformatf("address %h expected %h", m_addr, exp_addr));
      check(m_rnw == rd && m_burst == bu, "direction and burst flag");
      if (!rd) check(m_wdata == wd, "write data");
      check(!addr_ok && !data_ok, "nothing accepted yet");
      if (la-- > 0) @(posedge clk); #1;
    end
    m_gnt = 1; #1;
    check(addr_ok, "addr_ok with the master's grant");
    @(posedge clk); #1;
    m_gnt = 0; read = 0; write = 0; #1;
    check(!m_req, "request withdrawn after acceptance");
    repeat (ld) begin
      check(!data_ok, "no data_ok before bus_ack");
      @(posedge clk); #1;
    end
    bus_ack = 1; m_rdata = rword; #1;
    check(data_ok, "data_ok with bus_ack");
    if (rd) check(data_in == rword, "read data passed on");
    @(posedge clk); #1;
    bus_ack = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int b = 0; b < NUM_BANKS; b++) begin
      base[b] = $urandom & 32'hffff_fffc;
      cfg_write(2 + b, base[b]);
    end
    cfg_write(1, 32'd17);
    check(prog_size == 17, "program size");
    reg_offset = 4'd5; #1;
    check(data_cfg_out == base[3], "configuration read back");
    for (int n = 0; n < 300; n++)
      access($urandom_range(0,1), BANK_W'($urandom), OFFSET_W'($urandom), $urandom,
             $urandom_range(0,1), $urandom_range(0,3), $urandom_range(0,2));
    // control: start and interrupt
    cfg_write(0, 32'h5);
    check(start && !irq, "start bit");
    done = 1; @(posedge clk); #1; done = 0;
    check(!start && irq, "done raises interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
