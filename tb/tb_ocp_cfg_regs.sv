// tb_ocp_cfg_regs -- self-checking test of the configuration registers.
//
// Writes every register with random values and reads them back through the
// configuration multiplexer, checks the bank base and program size outputs,
// the reserved indexes, and the control bits: S and IE as written, done
// clearing S and setting D, the interrupt as IE & D, D cleared by writing 1
// to it or by a new start.
module tb_ocp_cfg_regs;
  import ocp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, done = 0;
  logic [REG_OFF_W-1:0] reg_offset = '0;
  logic [DATA_W-1:0] data_cfg_in = '0, data_cfg_out, prog_size;
  logic start, irq;
  logic [ADDR_W-1:0] bank_base [NUM_BANKS];
  logic [DATA_W-1:0] model [NUM_CFG];
  int checks = 0, failures = 0;

  ocp_cfg_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int idx, logic [31:0] v);
    cfg_we = 1; reg_offset = REG_OFF_W'(idx); data_cfg_in = v;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int i = 0; i < 16; i++) begin reg_offset = REG_OFF_W'(i); #1; check(data_cfg_out == 0, "reset value"); end
    check(!start && !irq, "reset control");
    for (int round = 0; round < 4; round++) begin
      for (int i = 1; i < NUM_CFG; i++) begin model[i] = $urandom; wr(i, model[i]); end
      for (int i = 10; i < 16; i++) wr(i, $urandom);
      for (int i = 1; i < NUM_CFG; i++) begin
        reg_offset = REG_OFF_W'(i); #1;
        check(data_cfg_out == model[i], $sformatf("reg %0d read %h expected %h", i, data_cfg_out, model[i]));
      end
      for (int i = 10; i < 16; i++) begin reg_offset = REG_OFF_W'(i); #1; check(data_cfg_out == 0, "reserved reads zero"); end
      check(prog_size == model[1], "prog_size output");
      for (int b = 0; b < NUM_BANKS; b++)
        check(bank_base[b] == model[2+b], $sformatf("bank_base[%0d]", b));
    end
    // control bits
    wr(0, 32'h5);                      // S=1, IE=1
    reg_offset = 0; #1;
    check(data_cfg_out == 32'h5 && start && !irq, "start with interrupt enabled");
    done = 1; @(posedge clk); #1; done = 0;
    reg_offset = 0; #1;
    check(data_cfg_out == 32'h6 && !start && irq, "done sets D, clears S, raises irq");
    wr(0, 32'h4);                      // IE=1, no clear
    check(irq, "writing 0 to D keeps it");
    wr(0, 32'h6);                      // write 1 to D
    reg_offset = 0; #1;
    check(data_cfg_out == 32'h4 && !irq, "D is write-one-to-clear");
    wr(0, 32'h1);                      // S=1, IE=0
    done = 1; @(posedge clk); #1; done = 0;
    reg_offset = 0; #1;
    check(data_cfg_out == 32'h2 && !irq, "no interrupt without IE");
    wr(0, 32'h1);                      // new start clears D
    reg_offset = 0; #1;
    check(data_cfg_out == 32'h1 && start, "new start clears D");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
