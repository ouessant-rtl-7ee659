// tb_ocp_ahb_slave -- self-checking test of the AHB configuration slave.
//
// The slave is connected to a register array standing in for the
// configuration registers. An AHB master model issues pipelined word
// transfers: back-to-back writes and reads, idle and unselected cycles,
// and cycles where another slave holds hready low. Checked: writes land in
// the register named by haddr[5:2] in their data phase, reads return that
// register, and transfers that are not selected, IDLE or stalled are
// ignored.
module tb_ocp_ahb_slave;
  import ocp_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic hsel = 0, hwrite = 0, hready = 1;
  logic [ADDR_W-1:0] haddr = '0;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'b010;
  logic [DATA_W-1:0] hwdata = '0, hrdata;
  logic hreadyout;
  logic [1:0] hresp;
  logic cfg_we;
  logic [REG_OFF_W-1:0] reg_offset;
  logic [DATA_W-1:0] data_cfg_in, data_cfg_out;
  logic [31:0] regs [16], model [16];
  int checks = 0, failures = 0;

  ocp_ahb_slave dut (.*);

  assign data_cfg_out = regs[reg_offset];
  always_ff @(posedge hclk) if (cfg_we) regs[reg_offset] <= data_cfg_in;

  always #5 hclk = ~hclk;

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // pipelined AHB: address phase of transfer n with data phase of n-1
  typedef struct { bit valid; bit wr; bit sel; int idx; logic [31:0] wd; } xfer_t;

  initial begin
    xfer_t prev, cur;
    for (int i = 0; i < 16; i++) begin regs[i] = 0; model[i] = 0; end
    prev.valid = 0;
    repeat (2) @(posedge hclk);
    hresetn = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge hclk);
      check(hreadyout && hresp == 2'b00, "zero wait states, OKAY");
      // random stall from another slave: the bus holds everything
      hready = ($urandom_range(0, 5) != 0);
      cur.valid = ($urandom_range(0, 3) != 0);
      cur.sel   = ($urandom_range(0, 4) != 0);
      cur.wr    = $urandom_range(0, 1);
      cur.idx   = $urandom_range(0, 15);
      cur.wd    = $urandom;
      if (hready) begin
        hsel   = cur.sel;
        htrans = cur.valid ? 2'b10 : 2'b00;
        haddr  = 32'h8000_0000 | 32'(cur.idx * 4);
        hwrite = cur.wr;
      end
      hwdata = prev.wd;
      #1;
      if (prev.valid && prev.sel && !prev.wr)
        check(hrdata == model[prev.idx], $sformatf("read reg %0d: %h expected %h", prev.idx, hrdata, model[prev.idx]));
      @(posedge hclk);
      if (hready) begin
        if (prev.valid && prev.sel && prev.wr) model[prev.idx] = prev.wd;
        prev = cur;
      end
    end
    @(negedge hclk); htrans = 2'b00; hsel = 0; hwdata = prev.wd;
    @(posedge hclk);
    if (prev.valid && prev.sel && prev.wr) model[prev.idx] = prev.wd;
    #1;
    for (int i = 0; i < 16; i++) check(regs[i] == model[i], $sformatf("final reg %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
