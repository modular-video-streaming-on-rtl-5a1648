// tb_line_fifo: random push/pop traffic against a queue reference model,
// with a non-power-of-two depth. Checks data order, count, full and empty.
module tb_line_fifo;
  localparam int W = 12, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  line_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check state
      checks++;
      if (count != q.size() || full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin
        failures++;
        $display("state mismatch: count=%0d model=%0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin
          failures++;
          $display("data mismatch: %h vs %h", dout, q[0]);
        end
      end
      // legal random stimulus, biased to reach full and empty
      pop  = (q.size() > 0) && ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 30));
      push = ((q.size() < DEPTH) || pop) && ($urandom_range(0, 99) < ((n / 500) % 2 ? 30 : 70));
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
