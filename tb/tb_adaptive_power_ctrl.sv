// tb_adaptive_power_ctrl: self-checking testbench of the per-word power
// control. Drives random level combinations of CEN, write wordlines, read
// wordlines, read pointer and R2 and compares CTRL_CELL and CTRL_READ of every
// word with a reference set/reset model (CEN over write over read-done over
// hold). Then replays the word sequence of a write, a hold and a read and
// checks the states of the summary table (write: off then on; read: on then
// off; CTRL_READ only in the first half of the read).
module tb_adaptive_power_ctrl;
  localparam int unsigned N = 8;
  logic         cen = 1'b1, r2 = 1'b0;
  logic [N-1:0] wl_w = '0, wl_r = '0, rptr = N'(1);
  logic [N-1:0] ctrl_cell, ctrl_read;
  logic [N-1:0] exp_cell = '1;
  int           checks = 0, failures = 0;

  adaptive_power_ctrl #(.WORDS(N)) dut (.cen(cen), .wl_w(wl_w), .wl_r(wl_r), .rptr(rptr),
                                        .r2(r2), .ctrl_cell(ctrl_cell), .ctrl_read(ctrl_read));

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
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
    check("all words off while disabled", ctrl_cell, '1);
    cen = 1'b0;
    #1;
    check("still off after enable", ctrl_cell, '1);
    for (int i = 0; i < 2000; i++) begin
      cen  = ($urandom_range(0, 30) == 0);
      wl_w = ($urandom_range(0, 1) != 0) ? N'(1) << $urandom_range(0, N-1) : '0;
      wl_r = ($urandom_range(0, 1) != 0) ? N'(1) << $urandom_range(0, N-1) : '0;
      rptr = N'(1) << $urandom_range(0, N-1);
      r2   = $urandom_range(0, 1);
      for (int w = 0; w < N; w++) begin
        if (cen)              exp_cell[w] = 1'b1;
        else if (wl_w[w])     exp_cell[w] = 1'b0;
        else if (r2 && rptr[w]) exp_cell[w] = 1'b1;
      end
      #1;
      check("ctrl_cell", ctrl_cell, exp_cell);
      check("ctrl_read", ctrl_read, wl_r);
    end
    // Word 3 through write, hold and read, as in the word state table.
    cen = 1'b1; wl_w = '0; wl_r = '0; r2 = 1'b0; rptr = N'(1) << 3; #1;
    cen = 1'b0; #1;
    check("empty word off", ctrl_cell & N'(8), N'(8));
    check("empty word read foot high", ctrl_read, '0);
    wl_w = N'(8); #1;
    check("write second half: word on", ctrl_cell & N'(8), '0);
    wl_w = '0; #1;
    check("hold with data: word on", ctrl_cell & N'(8), '0);
    check("hold: read foot high", ctrl_read, '0);
    wl_r = N'(8); #1;
    check("read first half: word on", ctrl_cell & N'(8), '0);
    check("read first half: foot at ground", ctrl_read, N'(8));
    wl_r = '0; r2 = 1'b1; #1;
    check("read second half: word off", ctrl_cell & N'(8), N'(8));
    check("read second half: foot high", ctrl_read, '0);
    r2 = 1'b0; #1;
    check("after read: word stays off", ctrl_cell & N'(8), N'(8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
