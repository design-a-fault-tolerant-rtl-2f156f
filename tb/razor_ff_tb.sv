// razor_ff_tb: an 8-bit Razor register under a 10 ns clock and a delayed clock
// 3 ns behind it (high 3..8 ns into each cycle).
//
// Normal data is applied 9 ns into the cycle and must be captured at the next
// edge with no error. A late arrival is modelled by changing d 1 ns after the
// edge: the main flip-flop keeps the old value, error must rise when the
// delayed clock falls, the next edge must restore the late value from the
// shadow latch (one cycle late) while ignoring d, and the cycle after must be
// error-free again.
module razor_ff_tb;
  localparam int WIDTH = 8;

  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic [WIDTH-1:0] d = '0, q;
  logic error;
  int checks = 0, failures = 0, cycles = 0, late_events = 0;

  razor_ff #(.WIDTH(WIDTH)) dut (.clk(clk), .clk_del(clk_del), .rst_n(rst_n),
                                 .d(d), .q(q), .error(error));

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("t=%0t: %s (q=%0h d=%0h error=%0b)", $time, what, q, d, error);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] v, late, next;
    #12 rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      if ($urandom_range(0, 4) != 0) begin
        // normal: settle before the edge
        v = WIDTH'($urandom);
        #9 d = v;                          // 9 ns into the cycle
        @(posedge clk); #1;
        chk(q == v, "normal value not captured");
        #7.5;                              // after clk_del has fallen
        chk(!error, "error on a normal cycle");
        #0.5;                              // back at 9 ns into the cycle
        @(posedge clk);
      end else begin
        // late: d changes 1 ns after the edge
        v = q;
        late = WIDTH'($urandom);
        if (late == v) late = ~v;
        next = WIDTH'($urandom);
        #1 d = late;
        #1 chk(q == v, "main flip-flop took the late value");
        #7;                                // 9 ns: shadow latch has closed
        chk(error, "late arrival not flagged");
        d = next;                          // presented, must be ignored
        @(posedge clk); #1;
        chk(q == late, "late value not restored from the shadow latch");
        late_events++;
        #8;                                // 9 ns, past the clk_del fall
        chk(!error, "error in the cycle after recovery");
        d = next;
        @(posedge clk); #1;
        chk(q == next, "value after recovery not captured");
        #8;
        @(posedge clk);
      end
    end
    chk(late_events > 0, "no late arrival exercised");
    $display("late arrivals recovered: %0d", late_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
