// tb_read_ctrl: self-checking testbench of the read control pulse generator.
// Drives random CEN/REN between clock edges and compares READ, RD and R2 in
// both halves of every CLK_R cycle with a reference model: READ follows the
// request sampled at the last rising edge, RD = READ in the first half, R2 =
// READ in the second half. Also checks that raising CEN clears READ at once.
module tb_read_ctrl;
  logic clk_r = 1'b0, cen = 1'b1, ren = 1'b1;
  logic read, rd, r2;
  logic exp_read = 1'b0;
  int   checks = 0, failures = 0;

  read_ctrl dut (.clk_r(clk_r), .cen(cen), .ren(ren), .read(read), .rd(rd), .r2(r2));

  always #5 clk_r = ~clk_r;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
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
    int n_reads = 0;
    repeat (2) @(posedge clk_r);
    @(negedge clk_r);
    #1;
    for (int i = 0; i < 400; i++) begin
      // inputs change just after the falling edge, once per cycle
      cen = ($urandom_range(0, 9) == 0);
      ren = ($urandom_range(0, 2) == 0);
      @(posedge clk_r);
      exp_read = !cen && !ren;
      if (exp_read) n_reads++;
      #1;
      check("read (first half)", read, exp_read);
      check("rd (first half)",   rd,   exp_read);
      check("r2 (first half)",   r2,   1'b0);
      @(negedge clk_r);
      #1;
      check("read (second half)", read, exp_read);
      check("rd (second half)",   rd,   1'b0);
      check("r2 (second half)",   r2,   exp_read);
    end
    // chip disable clears READ without waiting for a clock edge
    @(negedge clk_r); #1; cen = 1'b0; ren = 1'b0;
    @(posedge clk_r); #1; check("read before disable", read, 1'b1);
    #1 cen = 1'b1; #1;
    check("read cleared by cen", read, 1'b0);
    check("rd cleared by cen",   rd,   1'b0);
    checks++;
    if (n_reads == 0) begin failures++; $display("FAIL no read was issued"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
