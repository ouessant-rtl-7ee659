// tb_ocp_controller -- self-checking test of the instruction controller.
//
// The testbench plays the memory (indexed by bank and offset, accepting
// addresses and completing them in order after random delays, with at most
// one access open), one input and one output FIFO (queues,
// the input one only 4 words deep so that mvtc stalls on full) and an
// accelerator that drains the input FIFO, and on start_op writes one
// result word (input word + 1) per received word into the output FIFO
// before pulsing end_op. Three programs run:
//   1. two mvtc of 8 words, execs, two mvfc of 8 words, eop
//   2. an unknown opcode, an mvfc naming a FIFO that does not exist and an
//      mvtc of 2 words, ended by the program size (no eop)
//   3. an mvfc of 4 words whose data trickles into the output FIFO, so the
//      controller stalls on empty
// Checked: the words reaching the input FIFO, the words written back, the
// number of start_op and done pulses, the stalls, and that instructions
// are fetched from bank 0 in order.
module tb_ocp_controller;
  import ocp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, done, busy;
  logic [DATA_W-1:0] prog_size = '0;
  logic [BANK_W-1:0] bank;
  logic [OFFSET_W-1:0] offset;
  logic read, write, burst, addr_ok = 0, data_ok = 0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic [0:0] in_wr_en, in_full, in_afull, out_rd_en, out_empty;
  logic [DATA_W-1:0] in_din;
  logic [DATA_W-1:0] out_dout [1];
  logic start_op, end_op = 0;

  ocp_controller #(.NUM_IN(1), .NUM_OUT(1)) dut (.*);

  logic [31:0] mem [logic [BANK_W+OFFSET_W-1:0]];
  logic [31:0] in_q [$], out_q [$], received [$], pushed_log [$];
  int checks = 0, failures = 0;
  int n_start_op = 0, n_done = 0, n_full_stall = 0, n_empty_stall = 0, n_fetch = 0;
  int last_fetch = -1;
  bit trickle = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  assign in_full[0]   = in_q.size() >= 4;
  assign in_afull[0]  = in_q.size() >= 3;
  assign out_empty[0] = out_q.size() == 0;
  assign out_dout[0]  = (out_q.size() > 0) ? out_q[0] : 32'h0;

  // memory model: accepts an address (addr_ok) at random, completes the
  // accepted accesses in order (data_ok) at random, and accepts a new
  // address while one is open only in the cycle that one completes
  typedef struct { bit rd; logic [BANK_W+OFFSET_W-1:0] a; logic [31:0] d; } acc_t;
  acc_t open_q [$];
  always @(posedge clk) begin
    if (data_ok) void'(open_q.pop_front());
    if (addr_ok) begin
      acc_t x;
      x.rd = read; x.a = {bank, offset}; x.d = data_out;
      open_q.push_back(x);
      if (dut.state == dut.S_FETCH) begin
        n_fetch++;
        check(bank == 0 && int'(offset) == last_fetch + 1, "fetch in order from bank 0");
        last_fetch = int'(offset);
      end
    end
  end
  initial begin
    forever begin
      @(posedge clk); #1;
      data_ok = (open_q.size() > 0) && ($urandom_range(0, 2) != 0);
      if (data_ok) begin
        if (open_q[0].rd) data_in = mem.exists(open_q[0].a) ? mem[open_q[0].a] : 32'h0;
        else mem[open_q[0].a] = open_q[0].d;
      end
      addr_ok = (read || write) && (open_q.size() == 0 || data_ok) && ($urandom_range(0, 2) != 0);
      check(open_q.size() <= 1, "at most one access open");
    end
  end

  // FIFO and accelerator models
  always @(posedge clk) begin
    if (in_wr_en[0]) begin in_q.push_back(in_din); pushed_log.push_back(in_din); end
    if (out_rd_en[0]) void'(out_q.pop_front());
    if (in_q.size() > 0 && $urandom_range(0, 3) == 0) received.push_back(in_q.pop_front());
    if (start_op) n_start_op++;
    if (done) n_done++;
    if (dut.state == dut.S_MVTC && in_full[0]) n_full_stall++;
    check(in_q.size() <= 4, "input FIFO never overfilled");
    if (dut.state == dut.S_MVFC && out_empty[0]) n_empty_stall++;
    if (trickle && $urandom_range(0, 7) == 0) out_q.push_back($urandom);
  end

  initial begin
    forever begin
      @(posedge clk);
      if (start_op) begin
        // finish consuming, then produce
        while (in_q.size() > 0) @(posedge clk);
        repeat (5) @(posedge clk);
        foreach (received[i]) out_q.push_back(received[i] + 1);
        received.delete();
        #1 end_op = 1;
        @(posedge clk); #1 end_op = 0;
      end
    end
  end

  task automatic run(int size, int max_cycles);
    int n = 0;
    prog_size = size;
    @(negedge clk); start = 1;
    while (!done && n < max_cycles) begin @(posedge clk); n++; end
    check(done, "program ends");
    @(negedge clk); start = 0;   // the configuration registers clear S on done
    @(posedge clk); #1;
    check(!busy, "controller idle after the program");
  endtask

  initial begin
    logic [31:0] src [16];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program 1
    for (int i = 0; i < 16; i++) begin src[i] = $urandom; mem[{3'd1, 14'(i)}] = src[i]; end
    mem[{3'd0, 14'd0}] = make_instr(OP_MVTC, 3'd1, 14'd0, 3'd3, 3'd0);
    mem[{3'd0, 14'd1}] = make_instr(OP_MVTC, 3'd1, 14'd8, 3'd3, 3'd0);
    mem[{3'd0, 14'd2}] = make_instr(OP_EXECS, 3'd0, 14'd0, 3'd0, 3'd0);
    mem[{3'd0, 14'd3}] = make_instr(OP_MVFC, 3'd2, 14'd0, 3'd3, 3'd0);
    mem[{3'd0, 14'd4}] = make_instr(OP_MVFC, 3'd2, 14'd8, 3'd3, 3'd0);
    mem[{3'd0, 14'd5}] = make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0);
    mem[{3'd0, 14'd6}] = make_instr(OP_MVTC, 3'd1, 14'd0, 3'd3, 3'd0); // after eop: never run
    run(7, 5000);
    check(pushed_log.size() == 16, $sformatf("16 words to the input FIFO, got %0d", pushed_log.size()));
    for (int i = 0; i < 16 && i < pushed_log.size(); i++)
      check(pushed_log[i] == src[i], $sformatf("input word %0d", i));
    for (int i = 0; i < 16; i++)
      check(mem.exists({3'd2, 14'(i)}) && mem[{3'd2, 14'(i)}] == src[i] + 1, $sformatf("result word %0d", i));
    check(n_start_op == 1, "one start_op");
    check(n_done == 1, "one done");
    check(n_fetch == 6, $sformatf("6 fetches, got %0d", n_fetch));
    check(n_full_stall > 0, "mvtc stalled on a full FIFO");
    // program 2
    pushed_log.delete(); last_fetch = -1; n_fetch = 0;
    mem[{3'd0, 14'd0}] = {5'd31, 27'd0};
    mem[{3'd0, 14'd1}] = make_instr(OP_MVFC, 3'd2, 14'd0, 3'd0, 3'd5);
    mem[{3'd0, 14'd2}] = make_instr(OP_MVTC, 3'd1, 14'd3, 3'd1, 3'd0);
    run(3, 2000);
    check(n_fetch == 3, "three instructions fetched");
    check(pushed_log.size() == 2 && pushed_log[0] == src[3] && pushed_log[1] == src[4], "mvtc after skipped instructions");
    check(n_done == 2, "program size ends the program");
    while (in_q.size() > 0) @(posedge clk);
    received.delete();
    // program 3
    last_fetch = -1; n_fetch = 0;
    mem[{3'd0, 14'd0}] = make_instr(OP_MVFC, 3'd4, 14'd0, 3'd2, 3'd0);
    mem[{3'd0, 14'd1}] = make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0);
    trickle = 1;
    run(2, 5000);
    trickle = 0;
    check(n_empty_stall > 0, "mvfc stalled on an empty FIFO");
    for (int i = 0; i < 4; i++) check(mem.exists({3'd4, 14'(i)}), "trickled word written");
    // empty program
    run(0, 100);
    check(n_done == 4, "empty program ends at once");
    $display("stalls: full %0d empty %0d", n_full_stall, n_empty_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
