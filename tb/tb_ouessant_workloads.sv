// tb_ouessant_workloads -- the two accelerator workloads run end to end.
//
// The coprocessor is built with RATIO = 2, so one accelerator word is a
// complex sample (real part in the low 32 bits, imaginary part in the high
// 32 bits) or a pair of IDCT coefficients. Around it: a CPU model on the
// slave port, an always-granting arbiter, a zero-wait-state AHB memory,
// and a behavioural accelerator that computes the real transform with
// floating-point arithmetic, waits its processing latency after start_op,
// writes its results into the output FIFO one word per cycle and pulses
// end_op.
//   DFT : a 256-point complex DFT. The microcode is eight 64-word mvtc
//         from bank 1, execs, eight 64-word mvfc to bank 2, eop: 512 words
//         each way. Accelerator latency 2485 cycles.
//   IDCT: one 8x8 2D inverse DCT, 64 coefficients from bank 3 and 64
//         samples to bank 4 with one 64-word mvtc and one mvfc. Accelerator
//         latency 18 cycles.
// The results in memory are compared with a reference transform computed
// here, and the cycles from the start write to the done flag are measured
// and bounded by the sum of the instruction costs, the accelerator latency
// and its output time.
// The DFT microcode and both latencies are the published figures for the
// two cores. The data layout, RATIO, the memory map, the floating-point
// models and the rounding are this testbench's own choices.
module tb_ouessant_workloads;
  import ocp_pkg::*;

  localparam int R = 2;
  localparam int ACC_W = R * DATA_W;
  localparam real PI = 3.14159265358979323846;

  logic hclk = 0, hresetn = 0;
  logic s_hsel = 0, s_hwrite = 0, s_hready;
  logic [ADDR_W-1:0] s_haddr = '0;
  logic [1:0] s_htrans = 2'b00;
  logic [2:0] s_hsize = 3'b010;
  logic [DATA_W-1:0] s_hwdata = '0, s_hrdata;
  logic s_hreadyout;
  logic [1:0] s_hresp;
  logic m_hbusreq, m_hgrant, m_hwrite, m_hready;
  logic [ADDR_W-1:0] m_haddr;
  logic [1:0] m_htrans, m_hresp;
  logic [2:0] m_hsize, m_hburst;
  logic [DATA_W-1:0] m_hwdata, m_hrdata;
  logic irq;
  logic acc_start_op, acc_end_op = 0;
  logic [0:0] acc_in_rd_en, acc_in_empty, acc_out_wr_en = '0, acc_out_full;
  logic [ACC_W-1:0] acc_in_data [1];
  logic [ACC_W-1:0] acc_out_data [1];

  ouessant_top #(.RATIO(R)) dut (.*);

  assign s_hready = s_hreadyout;
  assign m_hresp  = 2'b00;
  assign m_hready = 1'b1;
  assign m_hgrant = 1'b1;

  always #5 hclk = ~hclk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory: 8K words from 0x4000_0000, bank b at b * 1K words
  localparam logic [31:0] MEM_BASE = 32'h4000_0000;
  logic [31:0] mem [8192];
  function automatic int widx(logic [31:0] a);
    return int'(a[14:2]);
  endfunction
  function automatic logic [31:0] bank_addr(int b);
    return MEM_BASE + 32'(b) * 32'h1000;
  endfunction
  bit dp_valid = 0, dp_write = 0;
  logic [31:0] dp_addr;
  always @(posedge hclk) begin
    if (dp_valid && dp_write) mem[widx(dp_addr)] <= m_hwdata;
    dp_valid <= (m_htrans == 2'b10);
    dp_write <= m_hwrite;
    dp_addr  <= m_haddr;
  end
  assign m_hrdata = mem[widx(dp_addr)];

  // CPU model
  localparam logic [31:0] OCP_BASE = 32'h8000_0000;
  task automatic cpu_write(int idx, logic [31:0] v);
    @(negedge hclk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 1; s_haddr = OCP_BASE + 32'(idx * 4);
    @(negedge hclk);
    s_hsel = 0; s_htrans = 2'b00; s_hwdata = v;
    @(posedge hclk);
  endtask

  // ---------------- behavioural accelerator ------------------------------
  typedef enum {K_DFT, K_IDCT} kernel_e;
  kernel_e kernel;
  int latency;
  logic [ACC_W-1:0] acc_buf [$], pending [$];

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  // y[k] = sum_n x[n] exp(-2 pi i k n / N)
  function automatic void dft(input int n_pts, input int xr [], input int xi [],
                              output int yr [], output int yi []);
    yr = new[n_pts]; yi = new[n_pts];
    for (int k = 0; k < n_pts; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < n_pts; n++) begin
        real a = -2.0 * PI * real'((k * n) % n_pts) / real'(n_pts);
        sr += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        si += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      yr[k] = rnd(sr); yi[k] = rnd(si);
    end
  endfunction

  // f(x,y) = 1/4 sum_u sum_v C(u) C(v) F(u,v) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
  function automatic void idct8x8(input int c [], output int f []);
    f = new[64];
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        real s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            real cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            real cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            s += cu * cv * real'(c[8*u + v]) * $cos(real'(2*x + 1) * u * PI / 16.0)
                                            * $cos(real'(2*y + 1) * v * PI / 16.0);
          end
        f[8*x + y] = rnd(s / 4.0);
      end
  endfunction

  // streaming input: the accelerator reads its FIFO whenever it has data
  assign acc_in_rd_en[0] = hresetn && !acc_in_empty[0];
  always @(posedge hclk) begin
    if (hresetn && acc_in_rd_en[0]) acc_buf.push_back(acc_in_data[0]);
    if (acc_out_wr_en[0]) void'(pending.pop_front());
  end
  always @(negedge hclk) begin
    acc_out_wr_en[0] <= drain && pending.size() > 0 && !acc_out_full[0];
    acc_out_data[0]  <= (pending.size() > 0) ? pending[0] : '0;
  end
  bit drain = 0;
  initial begin
    forever begin
      @(posedge hclk);
      if (acc_start_op) begin
        int xr [], xi [], yr [], yi [], c [], f [];
        check(acc_buf.size() == ((kernel == K_DFT) ? 256 : 32),
              $sformatf("accelerator received %0d words before start_op", acc_buf.size()));
        repeat (latency) @(posedge hclk);
        if (kernel == K_DFT) begin
          xr = new[256]; xi = new[256];
          foreach (acc_buf[i]) begin xr[i] = int'(acc_buf[i][31:0]); xi[i] = int'(acc_buf[i][63:32]); end
          dft(256, xr, xi, yr, yi);
          for (int k = 0; k < 256; k++) pending.push_back({32'(yi[k]), 32'(yr[k])});
        end else begin
          c = new[64];
          foreach (acc_buf[i]) begin c[2*i] = int'(acc_buf[i][31:0]); c[2*i+1] = int'(acc_buf[i][63:32]); end
          idct8x8(c, f);
          for (int k = 0; k < 32; k++) pending.push_back({32'(f[2*k+1]), 32'(f[2*k])});
        end
        acc_buf.delete();
        drain = 1;
        while (pending.size() > 0) @(posedge hclk);
        drain = 0;
        #1 acc_end_op = 1;
        @(posedge hclk); #1 acc_end_op = 0;
      end
    end
  end

  // ---------------- runs ------------------------------------------------
  int pc;
  task automatic prog(logic [31:0] w);
    mem[widx(bank_addr(0)) + pc] = w;
    pc++;
  endtask

  task automatic run(output int cycles);
    int n = 0;
    cpu_write(1, pc);
    cpu_write(0, 32'h5);
    while (!irq && n < 50000) begin @(posedge hclk); n++; end
    check(irq, "interrupt at the end of the program");
    cycles = n;
    cpu_write(0, 32'h2);
  endtask

  initial begin
    int xr [], xi [], yr [], yi [], c [], f [];
    int cyc, bound;
    repeat (3) @(posedge hclk);
    hresetn = 1;
    for (int b = 0; b < NUM_BANKS; b++) cpu_write(2 + b, bank_addr(b));

    // ---- 256-point DFT ----
    xr = new[256]; xi = new[256];
    for (int i = 0; i < 256; i++) begin
      xr[i] = $urandom_range(0, 2000) - 1000;
      xi[i] = $urandom_range(0, 2000) - 1000;
      mem[widx(bank_addr(1)) + 2*i]     = 32'(xr[i]);
      mem[widx(bank_addr(1)) + 2*i + 1] = 32'(xi[i]);
    end
    pc = 0;
    for (int k = 0; k < 8; k++) prog(make_instr(OP_MVTC, 3'd1, 14'(64 * k), 3'd6, 3'd0));
    prog(make_instr(OP_EXECS, 3'd0, 14'd0, 3'd0, 3'd0));
    for (int k = 0; k < 8; k++) prog(make_instr(OP_MVFC, 3'd2, 14'(64 * k), 3'd6, 3'd0));
    prog(make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0));
    kernel = K_DFT; latency = 2485;
    run(cyc);
    dft(256, xr, xi, yr, yi);
    for (int k = 0; k < 256; k++) begin
      check(mem[widx(bank_addr(2)) + 2*k] == 32'(yr[k]), $sformatf("DFT re[%0d]", k));
      check(mem[widx(bank_addr(2)) + 2*k + 1] == 32'(yi[k]), $sformatf("DFT im[%0d]", k));
    end
    // 18 instructions x (2 fetch + 2 sequencing), 16 transfers x 65, latency, 256 outputs
    bound = 18 * 4 + 16 * 65 + 2485 + 256 + 20;
    check(cyc <= bound, $sformatf("DFT run %0d cycles, bound %0d", cyc, bound));
    $display("DFT 256 points: %0d cycles from start to done", cyc);

    // ---- 8x8 IDCT ----
    c = new[64];
    for (int i = 0; i < 64; i++) begin
      c[i] = (i == 0) ? 800 : $urandom_range(0, 200) - 100;
      mem[widx(bank_addr(3)) + i] = 32'(c[i]);
    end
    pc = 0;
    prog(make_instr(OP_MVTC, 3'd3, 14'd0, 3'd6, 3'd0));
    prog(make_instr(OP_EXECS, 3'd0, 14'd0, 3'd0, 3'd0));
    prog(make_instr(OP_MVFC, 3'd4, 14'd0, 3'd6, 3'd0));
    prog(make_instr(OP_EOP, 3'd0, 14'd0, 3'd0, 3'd0));
    kernel = K_IDCT; latency = 18;
    run(cyc);
    idct8x8(c, f);
    for (int i = 0; i < 64; i++)
      check(mem[widx(bank_addr(4)) + i] == 32'(f[i]), $sformatf("IDCT sample %0d", i));
    bound = 4 * 4 + 2 * 65 + 18 + 32 + 20;
    check(cyc <= bound, $sformatf("IDCT run %0d cycles, bound %0d", cyc, bound));
    $display("IDCT 8x8: %0d cycles from start to done", cyc);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
