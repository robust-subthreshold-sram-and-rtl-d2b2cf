// tb_write_ctrl: self-checking testbench of the write control pulse generator.
// Drives random CEN/WEN/D between clock edges and checks WRITE for the whole
// CLK_W cycle after an accepted request, WR only in the second half, and the
// write-driver data din_q held for the whole WRITE cycle.
module tb_write_ctrl;
  localparam int unsigned W = 16;
  logic         clk_w = 1'b0, cen = 1'b1, wen = 1'b1;
  logic [W-1:0] d = '0;
  logic         write, wr;
  logic [W-1:0] din_q;
  logic         exp_write = 1'b0;
  logic [W-1:0] exp_din = '0;
  int           checks = 0, failures = 0;

  write_ctrl #(.WIDTH(W)) dut (.clk_w(clk_w), .cen(cen), .wen(wen), .d(d),
                               .write(write), .wr(wr), .din_q(din_q));

  always #5 clk_w = ~clk_w;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_writes = 0;
    repeat (2) @(posedge clk_w);
    @(negedge clk_w);
    #1;
    for (int i = 0; i < 400; i++) begin
      // inputs change just after the falling edge, once per cycle
      cen = ($urandom_range(0, 9) == 0);
      wen = ($urandom_range(0, 2) == 0);
      d   = W'($urandom);
      @(posedge clk_w);
      exp_write = !cen && !wen;
      if (cen) exp_din = '0;
      else if (!wen) exp_din = d;
      if (exp_write) n_writes++;
      #1;
      // the source moves on to new data right after the edge
      d = W'($urandom);
      check("write (first half)", W'(write), W'(exp_write));
      check("wr (first half)",    W'(wr),    '0);
      check("din_q (first half)", din_q,     exp_din);
      @(negedge clk_w);
      #1;
      check("write (second half)", W'(write), W'(exp_write));
      check("wr (second half)",    W'(wr),    W'(exp_write));
      check("din_q (second half)", din_q,     exp_din);
    end
    checks++;
    if (n_writes == 0) begin failures++; $display("FAIL no write was issued"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
