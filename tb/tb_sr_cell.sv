// tb_sr_cell: self-checking test of one shift-register cell.
//
// Drives a random bit stream and checks that q shows, in every cycle, the
// bit sampled at the previous rising edge (one cycle of latency). Also
// checks that the asynchronous reset clears the cell at once and that a
// stuck-at defect overrides the output with the stuck level.
module tb_sr_cell;
  import svtmr_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    d = 1'b0;
  defect_t defect = NO_DEFECT;
  logic    q;

  int checks = 0;
  int failures = 0;

  sr_cell dut (.clk(clk), .rst_n(rst_n), .d(d), .defect(defect), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    logic q_before;
    int   latency;
    // reset holds the output low
    d = 1'b1;
    repeat (2) @(negedge clk);
    expect_q(1'b0, "in reset");
    rst_n = 1'b1;

    // one-cycle latency on a random stream: the value set at one falling
    // edge is sampled at the next rising edge and seen at the falling edge
    // after it
    @(negedge clk);
    q_before = q;
    for (int i = 0; i < 500; i++) begin
      prev = 1'($urandom);
      d = prev;
      #1 expect_q(q_before, "output holds between edges");
      @(negedge clk);
      expect_q(prev, "stream");
      q_before = q;
    end

    // latency of an isolated pulse, in clock cycles
    d = 1'b0;
    repeat (3) @(negedge clk);
    d = 1'b1;
    latency = 0;
    @(negedge clk);
    d = 1'b0;
    latency = 1;
    checks++;
    if (q !== 1'b1 || latency != 1) begin
      failures++;
      $display("FAIL pulse did not appear after one cycle");
    end
    @(negedge clk);
    expect_q(1'b0, "pulse width is one cycle");

    // asynchronous reset clears a set cell before the next edge
    d = 1'b1;
    @(negedge clk);
    expect_q(1'b1, "set before reset");
    #2 rst_n = 1'b0;
    #1 expect_q(1'b0, "asynchronous reset");
    #2 rst_n = 1'b1;

    // stuck-at defects
    for (int v = 0; v < 2; v++) begin
      defect = '{stuck: 1'b1, value: 1'(v)};
      for (int i = 0; i < 20; i++) begin
        d = 1'($urandom);
        @(negedge clk);
        expect_q(1'(v), "stuck-at defect");
      end
    end
    defect = NO_DEFECT;
    d = 1'b1;
    @(negedge clk);
    expect_q(1'b1, "defect removed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
