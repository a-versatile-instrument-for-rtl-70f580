// tb_sync_fifo: self-checking test of sync_fifo against a queue model.
// Random pushes and pops (including pushes while full and pops while empty),
// a fill to full, a drain to empty, and a flush. Each cycle the head word,
// full, empty and level are compared with the model. A depth of 6 is used
// so that the pointer wrap at a depth that is not a power of two is covered.
module tb_sync_fifo;
  localparam int W = 16, D = 6;  // not a power of two: checks pointer wrap-around
  logic clk = 0, rst_n = 0;
  logic flush = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (model size %0d level %0d)", what, q.size(), level);
    end
  endtask


  int n_full = 0, n_empty_pop = 0;
  initial begin
    #1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(empty && !full && level == 0, "empty after reset");
    for (int i = 0; i < 2000; i++) begin
      bit pu, po, was_full, was_empty;
      logic [W-1:0] d, head;
      pu = ($urandom % 100) < (i < 1000 ? 60 : 40);
      po = ($urandom % 100) < (i < 1000 ? 40 : 60);
      d  = W'($urandom);
      was_full  = full;
      was_empty = empty;
      head = rdata;
      if (!was_empty) check(head == q[0], "head word");
      check(was_full == (q.size() == D), "full flag");
      check(was_empty == (q.size() == 0), "empty flag");
      check(level == q.size(), "level");
      if (was_full && pu) n_full++;
      if (was_empty && po) n_empty_pop++;
      push = pu; pop = po; wdata = d;
      @(posedge clk); #1;
      push = 0; pop = 0;
      if (po && !was_empty) void'(q.pop_front());
      if (pu && !was_full) q.push_back(d);
    end
    // flush
    push = 1; wdata = 16'h1234; @(posedge clk); #1; push = 0;
    flush = 1; @(posedge clk); #1; flush = 0;
    check(empty && level == 0, "flush empties");
    check(n_full > 0, "push while full exercised");
    check(n_empty_pop > 0, "pop while empty exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
