// tb_logic_pointer: self-checking testbench of the one-hot shift-register
// pointer at its full 256-word size. Shifts it with random gaps for more than
// three laps and checks after every edge that the pointer is one-hot at the
// expected word, that it wrapped from the last word to word 0, that the
// wordlines are the pointer ANDed with the pulse, and that CEN returns it to
// word 0.
module tb_logic_pointer;
  localparam int unsigned N = 256;
  logic         clk = 1'b0, cen = 1'b1, shift = 1'b0, pulse = 1'b0;
  logic [N-1:0] ptr, wl;
  int           idx = 0, wraps = 0;
  int           checks = 0, failures = 0;

  logic_pointer #(.WORDS(N)) dut (.clk(clk), .cen(cen), .shift(shift), .pulse(pulse),
                                  .ptr(ptr), .wl(wl));

  always #5 clk = ~clk;

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t (expected word %0d)", what, $time, idx);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #7 cen = 1'b0;
    check("pointer after disable", ptr, N'(1));
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      pulse = $urandom_range(0, 1);
      #1;
      check("wordlines", wl, pulse ? ptr : '0);
      @(posedge clk);
      if (shift) begin
        idx = (idx + 1) % N;
        if (idx == 0) wraps++;
      end
      #1;
      check("pointer", ptr, N'(1) << idx);
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL pointer wrapped only %0d times", wraps); end
    cen = 1'b1; #1;
    check("pointer reset by cen", ptr, N'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
