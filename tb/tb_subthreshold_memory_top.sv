// tb_subthreshold_memory_top: end-to-end testbench of the whole design at its
// default size: the 256 x 16 FIFO with a 5 MHz read clock and a 200 kHz write
// clock (asynchronous to each other), and the single-port 10T cell.
// A writer and a reader process act as the sensor filling the FIFO and the
// processor emptying it; they keep count of the words in flight, since the
// FIFO has no flags, and a scoreboard checks every word read. Phases: random
// traffic with simultaneous reads and writes (slow data gathering with
// occasional fast reads), drain, fill all 256 words, back-to-back drain at one
// word per read clock, a read of an empty word (zeros, the word is switched
// off), chip disable (data lost, pointers at word 0), normal operation after
// disable, and write/hold/read of the 10T cell. After drain and fill the
// per-word power state is checked: every empty word off, every full word on.
// Each mechanism is counted and one never exercised counts as a failure.
module tb_subthreshold_memory_top;
  localparam int unsigned N = ulp_fifo_pkg::FIFO_WORDS, W = ulp_fifo_pkg::FIFO_WIDTH;
  localparam int TR = 200, TW = 5000;   // 5 MHz read clock, 200 kHz write clock (delays read as ns)

  logic         cen = 1'b1, clk_r = 1'b0, ren = 1'b1, clk_w = 1'b0, wen = 1'b1;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;

  logic ac_wl1 = 1'b1, ac_wl2 = 1'b0, ac_vgnd = 1'b0, ac_bl = 1'b1, ac_br = 1'b1;
  logic ac_bl_pd, ac_br_pd;

  subthreshold_memory_top top (
    .cen(cen), .clk_r(clk_r), .ren(ren), .clk_w(clk_w), .wen(wen), .d(d), .q(q),
    .ac_wl1(ac_wl1), .ac_wl2(ac_wl2), .ac_vgnd(ac_vgnd), .ac_bl(ac_bl), .ac_br(ac_br),
    .ac_bl_pd(ac_bl_pd), .ac_br_pd(ac_br_pd)
  );

  initial begin #37; forever #(TR/2) clk_r = ~clk_r; end
  initial forever #(TW/2) clk_w = ~clk_w;

  int checks = 0, failures = 0;
  int wr_issued = 0, wr_done = 0, rd_issued = 0, rd_done = 0;
  logic [W-1:0] exp_q [$];
  bit  wr_enable = 0, rd_enable = 0, force_read = 0;
  int  wr_prob = 0, rd_prob = 0;
  int  n_ac_write = 0, n_ac_hold = 0, n_ac_read = 0;
  int  n_wwrap = 0, n_rwrap = 0;
  int  n_simul = 0, n_full = 0, n_empty_read = 0, n_disable = 0, n_idle = 0;
  int  rd_cycle = 0, first_rd_cycle = -1, last_rd_cycle = -1;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic count_mech(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    #(TW * 20000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer on the write clock.
  initial begin : writer
    bit pending = 0;
    forever begin
      @(negedge clk_w);
      if (top.u_fifo.u_write_ctrl.write && top.u_fifo.wptr[N-1]) n_wwrap++;   // wraps at the next edge
      wen = 1'b1;
      if (wr_enable && (wr_issued - rd_done) < N && $urandom_range(0, 99) < wr_prob) begin
        wen = 1'b0;
        d   = W'($urandom);
      end
      @(posedge clk_w);
      if (pending) wr_done++;
      pending = !cen && !wen;
      if (pending) begin
        wr_issued++;
        exp_q.push_back(d);
      end
    end
  end

  // Consumer on the read clock.
  initial begin : reader
    bit pending = 0, was_forced = 0;
    logic [W-1:0] exp = '0;
    forever begin
      @(negedge clk_r);
      if (top.u_fifo.u_read_ctrl.read && top.u_fifo.rptr[N-1]) n_rwrap++;
      if (pending) check(was_forced ? "read of an empty word" : "read data", q, exp);
      ren = 1'b1;
      if (force_read || (rd_enable && (wr_done - rd_issued) > 0 && $urandom_range(0, 99) < rd_prob))
        ren = 1'b0;
      @(posedge clk_r);
      rd_cycle++;
      if (pending && !was_forced) rd_done++;
      if (top.u_fifo.u_read_ctrl.read && top.u_fifo.u_write_ctrl.write) n_simul++;
      pending    = !cen && !ren;
      was_forced = force_read;
      if (pending) begin
        if (first_rd_cycle < 0) first_rd_cycle = rd_cycle;
        last_rd_cycle = rd_cycle;
        if (force_read) begin
          exp = '0;
          force_read = 0;
        end else begin
          rd_issued++;
          exp = exp_q.pop_front();
        end
      end
    end
  end

  task automatic wait_settled();
    wait (wr_done == wr_issued && rd_done == rd_issued);
    if (rd_enable && rd_prob == 100) wait (rd_done == wr_issued);
    repeat (2) @(posedge clk_w);
  endtask

  task automatic chip_disable();
    @(negedge clk_w);
    cen = 1'b1;
    #(TW);
    check("all words off while disabled", W'(&top.u_fifo.u_power_ctrl.ctrl_cell), W'(1));
    check("read pointer at word 0", W'(top.u_fifo.rptr == N'(1)), W'(1));
    check("write pointer at word 0", W'(top.u_fifo.wptr == N'(1)), W'(1));
    n_disable++;
    cen = 1'b0;
    #(TW);
  endtask

  initial begin
    chip_disable();
    // 1. random traffic
    wr_enable = 1; rd_enable = 1; wr_prob = 80; rd_prob = 3;
    wait (wr_issued >= 6 * N);
    // 2. drain
    wr_enable = 0; rd_prob = 100;
    wait_settled();
    check("empty FIFO: all words off", W'(&top.u_fifo.u_power_ctrl.ctrl_cell), W'(1));
    // 3. fill to full without reading
    rd_enable = 0; wr_enable = 1; wr_prob = 100;
    wait (wr_issued - rd_done == N);
    wr_enable = 0;
    wait_settled();
    n_full++;
    check("full FIFO: all words on", W'(|top.u_fifo.u_power_ctrl.ctrl_cell), W'(0));
    repeat (5) @(posedge clk_w);   // hold: enabled, no access
    n_idle++;
    // 4. back-to-back drain: one word per read clock
    first_rd_cycle = -1;
    rd_enable = 1; rd_prob = 100;
    wait_settled();
    check("back-to-back reads, cycles", W'(last_rd_cycle - first_rd_cycle + 1), W'(N));
    check("drained FIFO: all words off", W'(&top.u_fifo.u_power_ctrl.ctrl_cell), W'(1));
    // 5. read of an empty word returns zeros (word switched off)
    rd_enable = 0;
    @(negedge clk_r); force_read = 1;
    wait (force_read == 0);
    repeat (3) @(posedge clk_r);
    n_empty_read++;
    // 6. chip disable throws the data away and restarts at word 0
    chip_disable();
    wr_enable = 1; wr_prob = 100;
    wait (wr_issued - rd_done == 3);
    wr_enable = 0;
    wait_settled();
    chip_disable();
    exp_q.delete(); wr_issued = 0; wr_done = 0; rd_issued = 0; rd_done = 0;
    @(negedge clk_r); force_read = 1;
    wait (force_read == 0);
    repeat (3) @(posedge clk_r);
    chip_disable();   // realign the read pointer after the empty read
    // 7. normal operation again after disable
    wr_enable = 1; rd_enable = 1; wr_prob = 100; rd_prob = 50;
    wait (rd_issued >= N + 4);
    wr_enable = 0; rd_prob = 100;
    wait_settled();

    // 8. the single-port auto-compensation cell: write, hold, read
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = $urandom_range(0, 1);
      ac_bl = v; ac_br = ~v;
      ac_wl1 = 1; ac_wl2 = 1; ac_vgnd = 1; #10;      // write with VGND write assist
      ac_wl2 = 0; ac_vgnd = 0; ac_bl = 1; ac_br = 1; #10;   // hold
      n_ac_hold++;
      ac_wl1 = 0; ac_wl2 = 1; #10;                    // read
      check("10T cell differential read", W'({ac_bl_pd, ac_br_pd}), W'({v, ~v}));
      ac_wl1 = 1; ac_wl2 = 0; #10;
      n_ac_write++; n_ac_read++;
    end

    count_mech("simultaneous read/write", n_simul);
    count_mech("10T cell write (assist)", n_ac_write);
    count_mech("10T cell hold", n_ac_hold);
    count_mech("10T cell read", n_ac_read);
    count_mech("write pointer wraps", n_wwrap);
    count_mech("read pointer wraps", n_rwrap);
    count_mech("full FIFO", n_full);
    count_mech("hold cycles", n_idle);
    count_mech("read of empty word", n_empty_read);
    count_mech("chip disable", n_disable);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words never read", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
