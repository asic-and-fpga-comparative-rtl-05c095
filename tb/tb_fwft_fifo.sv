// tb_fwft_fifo: random push/pop/flush traffic on the 4 x 24 FWFT FIFO,
// checked against a queue model: the head must be visible on dout without
// a pop (first word fall through), full and empty must match the model's
// occupancy, and pushes when full / pops when empty must be ignored.
module tb_fwft_fifo;
  localparam int WIDTH = 24, DEPTH = 4;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic full, empty;
  int checks = 0, failures = 0, n_full = 0, n_flush = 0;
  logic [WIDTH-1:0] q[$];

  fwft_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pushed;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare state with the model
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++; $display("FAIL flags size=%0d full=%0d empty=%0d", q.size(), full, empty);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL dout %h exp %h", dout, q[0]); end
      end
      if (full) n_full++;
      push  = ($urandom_range(0, 99) < 55);
      pop   = ($urandom_range(0, 99) < 45);
      flush = ($urandom_range(0, 199) == 0);
      din   = WIDTH'($urandom);
      @(posedge clk);
      if (flush) begin q = {}; n_flush++; end
      else begin
        pushed = push && q.size() < DEPTH;
        if (pop && q.size() > 0) void'(q.pop_front());
        if (pushed) q.push_back(din);
      end
    end
    checks++;
    if (n_full == 0 || n_flush == 0) begin failures++; $display("FAIL coverage full=%0d flush=%0d", n_full, n_flush); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
