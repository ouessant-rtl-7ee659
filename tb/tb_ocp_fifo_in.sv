// tb_ocp_fifo_in -- self-checking test of the deserializing input FIFO.
//
// A reference queue of 32-bit words is kept alongside the FIFO. Phase 1
// fills the FIFO until full and checks that full rises exactly when DEPTH
// entries are stored and RATIO-1 further words are staged, and that empty
// falls one cycle after the word completing the first group. Phase 2
// drains it, checking each 96-bit entry against three consecutive
// reference words (first word in the low bits). Phase 3 writes and reads
// at random. In every cycle afull is checked against the number of words
// held (high when at most one more word fits).
module tb_ocp_fifo_in;
  localparam int W = 32, R = 3, D = 4;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, afull, empty;
  logic [W-1:0] din = '0;
  logic [R*W-1:0] dout;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];
  int written = 0;

  ocp_fifo_in #(.WORD_W(W), .RATIO(R), .DEPTH(D)) dut (.*);

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

  function automatic logic [R*W-1:0] expect_entry();
    logic [R*W-1:0] e;
    for (int i = 0; i < R; i++) e[i*W +: W] = ref_q[i];
    return e;
  endfunction

  // one cycle: apply inputs, clock, update the model
  task automatic cycle(bit w, logic [W-1:0] d, bit r);
    bit do_w, do_r;
    wr_en = w; din = d; rd_en = r && !empty;
    do_w = w && !full;
    do_r = r && !empty;
    check(afull == (D*R + R-1 - ref_q.size() <= 1),
          $sformatf("afull=%0d with %0d words held", afull, ref_q.size()));
    if (do_r) begin
      check(dout == expect_entry(), $sformatf("entry %h expected %h", dout, expect_entry()));
      for (int i = 0; i < R; i++) void'(ref_q.pop_front());
    end
    @(posedge clk); #1;
    if (do_w) begin ref_q.push_back(d); written++; end
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    check(empty && !full, "reset state");
    // phase 1: first group and latency
    cycle(1, $urandom, 0);
    cycle(1, $urandom, 0);
    check(empty, "empty with only two staged words");
    cycle(1, $urandom, 0);
    check(!empty, "entry visible one cycle after the completing word");
    // fill
    while (!full) cycle(1, $urandom, 0);
    check(written == D*R + R-1, $sformatf("full after %0d words, expected %0d", written, D*R+R-1));
    cycle(1, 32'hdead_beef, 0);   // refused
    check(written == D*R + R-1, "write ignored while full");
    // phase 2: drain, one read frees the way for the staged words
    cycle(0, 0, 1);
    check(!full, "full clears after a read");
    while (!empty) cycle(0, 0, 1);
    check(ref_q.size() == R-1, "two words stay staged");
    // phase 3: random traffic
    for (int n = 0; n < 3000; n++) cycle($urandom_range(0,1), $urandom, $urandom_range(0,2) == 0);
    while (!empty) cycle(0, 0, 1);
    check(ref_q.size() < R, "all complete groups delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
