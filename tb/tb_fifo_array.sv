// tb_fifo_array: self-checking testbench of the power-gated 7T-cell array
// (8 words x 16 bits). Plays the role of pointers and power control: writes
// random words through one-hot write wordlines with the word switched on,
// reads them back through the read wordline with the read-buffer foot at
// ground and the sense latch open, and checks against a reference memory.
// Also checks that the sense latch holds its word after the read pulse, that
// a word whose foot stays at VDD does not discharge the bitline, and that a
// word switched off loses its data.
module tb_fifo_array;
  localparam int unsigned N = 8, W = 16;
  logic [N-1:0] wl_w = '0, wl_r = '0, ctrl_cell = '1, ctrl_read = '0;
  logic [W-1:0] din = '0;
  logic         rd = 1'b0;
  logic [W-1:0] q;
  logic [W-1:0] ref_mem [N];
  logic [N-1:0] ref_on = '0;
  int           checks = 0, failures = 0;

  fifo_array #(.WORDS(N), .WIDTH(W)) dut (.wl_w(wl_w), .wl_r(wl_r), .ctrl_cell(ctrl_cell),
                                          .ctrl_read(ctrl_read), .din(din), .rd(rd), .q(q));

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic write_word(int w, logic [W-1:0] v);
    din = v; #1;
    wl_w[w] = 1'b1; ctrl_cell[w] = 1'b0; #1;   // second half of a write
    wl_w[w] = 1'b0; #1;
    din = ~v; #1;                               // driver moves on
    ref_mem[w] = v; ref_on[w] = 1'b1;
  endtask

  task automatic read_word(int w, logic foot_low, string what);
    logic [W-1:0] exp;
    exp = (ref_on[w] && foot_low) ? ref_mem[w] : '0;
    wl_r[w] = 1'b1; ctrl_read[w] = foot_low; rd = 1'b1; #1;
    check({what, " (sensing)"}, q, exp);
    rd = 1'b0; wl_r[w] = 1'b0; ctrl_read[w] = 1'b0; #1;
    check({what, " (latched)"}, q, exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int w = 0; w < N; w++) read_word(w, 1'b1, "powered-off word reads zero");
    for (int i = 0; i < 300; i++) begin
      int w;
      w = $urandom_range(0, N-1);
      case ($urandom_range(0, 4))
        0, 1: write_word(w, W'($urandom));
        2:    read_word(w, 1'b1, "read");
        3:    read_word(w, 1'b0, "read with foot at VDD");
        4: begin   // word consumed: switched off
          ctrl_cell[w] = 1'b1; #1;
          ref_on[w] = 1'b0;
          read_word(w, 1'b1, "read after power-off");
        end
      endcase
      // the latch keeps the last word while other wordlines change
      if ($urandom_range(0, 3) == 0) begin
        logic [W-1:0] held;
        held = q;
        write_word($urandom_range(0, N-1), W'($urandom));
        check("sense latch holds", q, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
