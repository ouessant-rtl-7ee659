// tb_ocp_fifo_out -- self-checking test of the serializing output FIFO.
//
// 96-bit entries are written and the 32-bit words read back are compared
// with the entries' slices, low slice first. Checks: the first word appears
// two cycles after its entry is written, full rises after DEPTH+1 entries
// (DEPTH in memory plus one in the unpacking register), a stream of words
// comes out back to back, and random write/read traffic keeps the order.
module tb_ocp_fifo_out;
  localparam int W = 32, R = 3, D = 4;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [R*W-1:0] din = '0;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];
  int entries = 0;

  ocp_fifo_out #(.WORD_W(W), .RATIO(R), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [R*W-1:0] rand_entry();
    logic [R*W-1:0] e;
    for (int i = 0; i < R; i++) e[i*W +: W] = $urandom;
    return e;
  endfunction

  task automatic cycle(bit w, logic [R*W-1:0] d, bit r);
    bit do_w, do_r;
    wr_en = w && !full; din = d; rd_en = r && !empty;
    do_w = w && !full;
    do_r = r && !empty;
    if (do_r) begin
      check(ref_q.size() > 0 && dout == ref_q[0], $sformatf("word %h expected %h", dout, ref_q[0]));
      void'(ref_q.pop_front());
    end
    @(posedge clk); #1;
    if (do_w) begin
      entries++;
      for (int i = 0; i < R; i++) ref_q.push_back(d[i*W +: W]);
    end
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    check(empty && !full, "reset state");
    cycle(1, rand_entry(), 0);
    check(empty, "not yet in the unpacking register");
    cycle(0, 0, 0);
    check(!empty, "first word two cycles after the write");
    while (!full) cycle(1, rand_entry(), 0);
    check(entries == D + 1, $sformatf("full after %0d entries", entries));
    // back-to-back reads: every cycle yields a word
    n = 0;
    while (!empty) begin cycle(0, 0, 1); n++; end
    check(n == (D + 1) * R, $sformatf("%0d words read in %0d cycles", (D+1)*R, n));
    for (int k = 0; k < 3000; k++) cycle($urandom_range(0,1), rand_entry(), $urandom_range(0,1));
    while (!empty) cycle(0, 0, 1);
    check(ref_q.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
