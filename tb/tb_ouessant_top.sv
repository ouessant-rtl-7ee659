// tb_ouessant_top -- end-to-end test of the coprocessor at its default
// parameters (one input and one output FIFO, 32 -> 96 bit, 256 entries).
//
// Around the coprocessor: a CPU model issuing AHB writes and reads on the
// slave port, a single-master arbiter that grants after a random delay, an
// AHB memory slave with random wait states, and a behavioural accelerator
// on the acc_* ports. Each run loads the bank bases, a microcode program in
// bank 0 and input data, starts the coprocessor and waits for D.
//   A  the DFT-style flow: six 64-word mvtc, execs, six 64-word mvfc, eop,
//      with the interrupt enabled. The accelerator turns every word x into
//      3x+1.
//   B  960 words in (15 mvtc) while the accelerator holds off reading, so
//      the input FIFO fills and the controller stalls; the accelerator then
//      adds pairs of 96-bit entries, and 480 words come back (15 mvfc of
//      32). Interrupt disabled: polling only.
//   C  an unknown opcode (skipped), a 96-word mvtc, execs on a streaming
//      accelerator that answers end_op at once and trickles its results, so
//      mvfc stalls on an empty FIFO; the program ends on its size, no eop.
//   D  a 64-word mvtc with the bus always granted and no wait states, to
//      measure the transfer rate: 65 cycles, one word per cycle after the
//      first.
// Each mechanism (the four instructions, interrupt, D cleared by write,
// full and empty stalls, wait states, grant delays, skip, end on size) is
// counted, and one that never happened counts as a failure.
module tb_ouessant_top;
  import ocp_pkg::*;

  localparam int R = 3;
  localparam int ACC_W = R * DATA_W;

  logic hclk = 0, hresetn = 0;
  // slave port
  logic s_hsel = 0, s_hwrite = 0, s_hready;
  logic [ADDR_W-1:0] s_haddr = '0;
  logic [1:0] s_htrans = 2'b00;
  logic [2:0] s_hsize = 3'b010;
  logic [DATA_W-1:0] s_hwdata = '0, s_hrdata;
  logic s_hreadyout;
  logic [1:0] s_hresp;
  // master port
  logic m_hbusreq, m_hgrant = 0, m_hwrite, m_hready = 1;
  logic [ADDR_W-1:0] m_haddr;
  logic [1:0] m_htrans, m_hresp;
  logic [2:0] m_hsize, m_hburst;
  logic [DATA_W-1:0] m_hwdata, m_hrdata;
  logic irq;
  // accelerator
  logic acc_start_op, acc_end_op = 0;
  logic [0:0] acc_in_rd_en = '0, acc_in_empty, acc_out_wr_en = '0, acc_out_full;
  logic [ACC_W-1:0] acc_in_data [1];
  logic [ACC_W-1:0] acc_out_data [1];

  ouessant_top dut (.*);

  assign s_hready = s_hreadyout;
  assign m_hresp  = 2'b00;

  always #5 hclk = ~hclk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- system memory: 32K words from 0x4000_0000 -------------
  localparam logic [31:0] MEM_BASE = 32'h4000_0000;
  logic [31:0] mem [32768];
  function automatic int widx(logic [31:0] a);
    return int'(a[16:2]);
  endfunction
  function automatic logic [31:0] bank_addr(int b);
    return MEM_BASE + 32'(b) * 32'h1000;   // 1K words per bank
  endfunction

  bit waits_on = 1, grant_delay_on = 1;
  int n_wait = 0, n_grant_wait = 0;
  bit dp_valid = 0, dp_write = 0;
  logic [31:0] dp_addr;

  always @(posedge hclk) begin
    if (m_hready) begin
      if (dp_valid && dp_write) mem[widx(dp_addr)] <= m_hwdata;
      dp_valid <= (m_htrans == 2'b10);
      dp_write <= m_hwrite;
      dp_addr  <= m_haddr;
      if (m_htrans == 2'b10)
        check(m_haddr[31:17] == MEM_BASE[31:17] && m_hsize == 3'b010, "master address in memory, word size");
    end
    if (m_hbusreq && !m_hgrant) n_grant_wait++;
  end
  always @(negedge hclk) begin
    m_hready <= !(dp_valid && waits_on && $urandom_range(0, 3) == 0);
    if (!m_hready) n_wait++;
    if (m_hbusreq) begin
      if (!m_hgrant && (!grant_delay_on || $urandom_range(0, 2) == 0)) m_hgrant <= 1;
    end else if (grant_delay_on && $urandom_range(0, 1) == 0) m_hgrant <= 0;
  end
  assign m_hrdata = mem[widx(dp_addr)];

  // ---------------- CPU model on the slave port ---------------------------
  localparam logic [31:0] OCP_BASE = 32'h8000_0000;
  task automatic cpu_write(int idx, logic [31:0] v);
    @(negedge hclk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 1; s_haddr = OCP_BASE + 32'(idx * 4);
    @(negedge hclk);
    s_hsel = 0; s_htrans = 2'b00; s_hwdata = v;
    @(posedge hclk);
  endtask
  task automatic cpu_read(int idx, output logic [31:0] v);
    @(negedge hclk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 0; s_haddr = OCP_BASE + 32'(idx * 4);
    @(negedge hclk);
    s_hsel = 0; s_htrans = 2'b00;
    #1 v = s_hrdata;
    @(posedge hclk);
  endtask

  // ---------------- behavioural accelerator ------------------------------
  typedef enum {ACC_MAP, ACC_PAIRS, ACC_STREAM} acc_mode_e;
  acc_mode_e acc_mode = ACC_MAP;
  bit consume_en = 1, trickle = 0;
  int expect_entries = 0;
  logic [ACC_W-1:0] acc_buf [$], pending [$];

  function automatic logic [ACC_W-1:0] map3(logic [ACC_W-1:0] e);
    for (int i = 0; i < R; i++) e[i*32 +: 32] = e[i*32 +: 32] * 3 + 1;
    return e;
  endfunction

  always @(negedge hclk) begin
    acc_in_rd_en[0]  <= consume_en && !acc_in_empty[0] && ($urandom_range(0, 1) == 0);
    acc_out_wr_en[0] <= pending.size() > 0 && !acc_out_full[0] && (!trickle || $urandom_range(0, 9) == 0);
    acc_out_data[0]  <= (pending.size() > 0) ? pending[0] : '0;
  end
  always @(posedge hclk) begin
    if (acc_in_rd_en[0]) begin
      acc_buf.push_back(acc_in_data[0]);
      if (acc_mode == ACC_STREAM) pending.push_back(map3(acc_in_data[0]));
    end
    if (acc_out_wr_en[0]) void'(pending.pop_front());
  end
  initial begin
    forever begin
      @(posedge hclk);
      if (acc_start_op) begin
        if (acc_mode == ACC_STREAM) begin
          #1 acc_end_op = 1;
          @(posedge hclk); #1 acc_end_op = 0;
        end else begin
          while (acc_buf.size() < expect_entries) @(posedge hclk);
          if (acc_mode == ACC_MAP) foreach (acc_buf[i]) pending.push_back(map3(acc_buf[i]));
          else for (int i = 0; i + 1 < acc_buf.size(); i += 2) begin
            logic [ACC_W-1:0] e;
            for (int k = 0; k < R; k++) e[k*32 +: 32] = acc_buf[i][k*32 +: 32] + acc_buf[i+1][k*32 +: 32];
            pending.push_back(e);
          end
          acc_buf.delete();
          while (pending.size() > 0) @(posedge hclk);
          #1 acc_end_op = 1;
          @(posedge hclk); #1 acc_end_op = 0;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------------------------
  int n_mvtc = 0, n_mvfc = 0, n_execs = 0, n_eop = 0, n_skip = 0, n_irq = 0;
  int n_full_stall = 0, n_empty_stall = 0, n_size_end = 0, n_d_clear = 0;
  int n_mvtc_cycles = 0;
  bit irq_q = 0;
  always @(posedge hclk) begin
    irq_q <= irq;
    if (irq && !irq_q) n_irq++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_DECODE) begin
      case (dut.u_ctrl.ir.opcode)
        OP_MVTC:  n_mvtc++;
        OP_MVFC:  n_mvfc++;
        OP_EXECS: n_execs++;
        OP_EOP:   n_eop++;
        default:  n_skip++;
      endcase
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_NEXT && dut.u_ctrl.pc >= dut.prog_size) n_size_end++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_MVTC) n_mvtc_cycles++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_MVTC && dut.in_full[0]) n_full_stall++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_MVFC && dut.out_empty[0]) n_empty_stall++;
  end

  // ---------------- helpers ---------------------------------------------
  int pc;
  task automatic prog(logic [31:0] w);
    mem[widx(bank_addr(0)) + pc] = w;
    pc++;
  endtask

  task automatic start_and_wait(bit ie, int max_cycles);
    logic [31:0] v;
    int n = 0;
    cpu_write(1, pc);
    cpu_write(0, ie ? 32'h5 : 32'h1);
    cpu_read(0, v);
    check(v[CTRL_S] && !v[CTRL_D], "running: S set, D clear");
    if (ie) begin
      while (!irq && n < max_cycles) begin @(posedge hclk); n++; end
      check(irq, "interrupt at the end of the program");
      cpu_read(0, v);
    end else begin
      do begin
        repeat (50) @(posedge hclk);
        n += 50;
        cpu_read(0, v);
        check(!irq, "no interrupt with IE clear");
      end while (!v[CTRL_D] && n < max_cycles);
    end
    check(v[CTRL_D] && !v[CTRL_S], "done: D set, S clear");
    cpu_write(0, 32'h2);   // clear D
    cpu_read(0, v);
    check(!v[CTRL_D] && !irq, "D cleared by the CPU");
    if (!v[CTRL_D]) n_d_clear++;
  endtask

  initial begin
    logic [31:0] v;
    logic [31:0] src [960];
    repeat (3) @(posedge hclk);
    hresetn = 1;
    for (int b = 0; b < NUM_BANKS; b++) cpu_write(2 + b, bank_addr(b));
    for (int b = 0; b < NUM_BANKS; b++) begin
      cpu_read(2 + b, v);
      check(v == bank_addr(b), "bank base read back");
    end

    // ---- run A: DFT-style flow, interrupt ----
    for (int i = 0; i < 384; i++) begin src[i] = $urandom; mem[widx(bank_addr(1)) + i] = src[i]; end
    pc = 0;
    for (int k = 0; k < 6; k++) prog(make_instr(OP_MVTC, 3'd1, 14'(64 * k), 3'd6, 3'd0));
    prog(make_instr(OP_EXECS, 3'd0, 14'd0, 3'd0, 3'd0));
    for (int k = 0; k < 6; k++) prog(make_instr(OP_MVFC, 3'd2, 14'(64 * k), 3'd6, 3'd0));
    prog(make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0));
    acc_mode = ACC_MAP; expect_entries = 128;
    start_and_wait(1, 100000);
    for (int i = 0; i < 384; i++)
      check(mem[widx(bank_addr(2)) + i] == src[i] * 3 + 1, $sformatf("run A result %0d", i));

    // ---- run B: input FIFO fills, pairs ----
    for (int i = 0; i < 960; i++) begin src[i] = $urandom; mem[widx(bank_addr(3)) + i] = src[i]; end
    pc = 0;
    for (int k = 0; k < 15; k++) prog(make_instr(OP_MVTC, 3'd3, 14'(64 * k), 3'd6, 3'd0));
    prog(make_instr(OP_EXECS, 3'd0, 14'd0, 3'd0, 3'd0));
    for (int k = 0; k < 15; k++) prog(make_instr(OP_MVFC, 3'd4, 14'(32 * k), 3'd5, 3'd0));
    prog(make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0));
    acc_mode = ACC_PAIRS; expect_entries = 320; consume_en = 0;
    fork
      start_and_wait(0, 200000);
      begin
        while (n_full_stall < 100) @(posedge hclk);
        consume_en = 1;
      end
    join
    for (int i = 0; i < 480; i++) begin
      automatic int e = i / 3;
      automatic int w = i % 3;
      check(mem[widx(bank_addr(4)) + i] == src[6*e + w] + src[6*e + 3 + w], $sformatf("run B result %0d", i));
    end

    // ---- run C: streaming accelerator, empty stalls, end on size ----
    for (int i = 0; i < 96; i++) begin src[i] = $urandom; mem[widx(bank_addr(5)) + i] = src[i]; end
    pc = 0;
    prog({5'd31, 27'd0});
    prog(make_instr(OP_MVTC, 3'd5, 14'd0, 3'd5, 3'd0));
    prog(make_instr(OP_MVTC, 3'd5, 14'd32, 3'd6, 3'd0));
    prog(make_instr(OP_EXECS, 3'd0, 14'd0, 3'd0, 3'd0));
    prog(make_instr(OP_MVFC, 3'd6, 14'd0, 3'd5, 3'd0));
    prog(make_instr(OP_MVFC, 3'd6, 14'd32, 3'd6, 3'd0));
    acc_mode = ACC_STREAM; consume_en = 0; trickle = 1;
    fork
      start_and_wait(1, 100000);
      begin
        while (dut.u_ctrl.state != dut.u_ctrl.S_EXEC_WAIT) @(posedge hclk);
        consume_en = 1;
      end
    join
    trickle = 0;
    for (int i = 0; i < 96; i++)
      check(mem[widx(bank_addr(6)) + i] == src[i] * 3 + 1, $sformatf("run C result %0d", i));

    // ---- run D: transfer rate ----
    waits_on = 0; grant_delay_on = 0;
    acc_mode = ACC_MAP; acc_buf.delete();
    pc = 0;
    prog(make_instr(OP_MVTC, 3'd1, 14'd0, 3'd6, 3'd0));
    prog(make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0));
    n_mvtc_cycles = 0;
    start_and_wait(0, 10000);
    check(n_mvtc_cycles == 64 + 1, $sformatf("64 words in %0d cycles, expected 65", n_mvtc_cycles));
    // leftover 64 words = 21 entries + 1 staged word; drain what came out
    repeat (200) @(posedge hclk);

    check(n_mvtc > 0,        "mvtc executed");
    check(n_mvfc > 0,        "mvfc executed");
    check(n_execs > 0,       "execs executed");
    check(n_eop > 0,         "eop executed");
    check(n_irq > 0,         "interrupt raised");
    check(n_d_clear > 0,     "D cleared by the CPU");
    check(n_full_stall > 0,  "stall on a full input FIFO");
    check(n_empty_stall > 0, "stall on an empty output FIFO");
    check(n_wait > 0,        "AHB wait states");
    check(n_grant_wait > 0,  "AHB grant delays");
    check(n_skip > 0,        "unknown instruction skipped");
    check(n_size_end > 0,    "program ended on its size");
    $display("mvtc %0d mvfc %0d execs %0d eop %0d irq %0d dclear %0d full-stall %0d empty-stall %0d wait %0d grant-wait %0d skip %0d size-end %0d",
             n_mvtc, n_mvfc, n_execs, n_eop, n_irq, n_d_clear, n_full_stall, n_empty_stall, n_wait, n_grant_wait, n_skip, n_size_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
