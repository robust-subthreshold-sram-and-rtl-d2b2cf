// wsn_gathering_run: one data-gathering run of the FIFO in a sensor node,
// used by tb_wsn_data_gathering.
// A sensor writes one sample on every write clock (200 kHz). When the FIFO
// holds WORDS - MARGIN words ("nearly full"), the processor drains it on
// consecutive read clocks (5 MHz) while the sensor keeps writing, until the
// FIFO is empty. After ROUNDS drains the sensor stops and the FIFO is emptied
// and disabled (standby). Every sample is checked in order, each drain must
// read one word per read clock, and the time spent in each mode (standby,
// write only, read and write together, read only, idle) is counted in read
// clock cycles and reported.
module wsn_gathering_run #(
  parameter int unsigned WORDS  = 256,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned MARGIN = 8,
  parameter int unsigned ROUNDS = 3,
  parameter int          TR     = 200,    // read clock period (5 MHz, delays read as ns)
  parameter int          TW     = 5000    // write clock period (200 kHz)
) (
  output int   checks,
  output int   failures,
  output logic done
);
  logic             cen = 1'b1, clk_r = 1'b0, ren = 1'b1, clk_w = 1'b0, wen = 1'b1;
  logic [WIDTH-1:0] d = '0, q;

  ulp_fifo #(.WORDS(WORDS), .WIDTH(WIDTH)) u_fifo (
    .cen(cen), .clk_r(clk_r), .ren(ren), .clk_w(clk_w), .wen(wen), .d(d), .q(q));

  initial begin #37; forever #(TR/2) clk_r = ~clk_r; end
  initial forever #(TW/2) clk_w = ~clk_w;

  int wr_issued = 0, wr_done = 0, rd_issued = 0, rd_done = 0;
  logic [WIDTH-1:0] exp_q [$];
  logic [WIDTH-1:0] sample = WIDTH'(16'hACE1);
  bit sensing = 0, draining = 0;
  int drains = 0, burst_words = 0, burst_cycles = 0, stalls = 0;
  longint n_standby = 0, n_wr_only = 0, n_both = 0, n_rd_only = 0, n_idle = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d words] %s at %0t", WORDS, what, $time);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
  end

  // Sensor: one sample per write clock while sensing.
  initial begin : sensor
    bit pending = 0;
    forever begin
      @(negedge clk_w);
      wen = 1'b1;
      if (sensing) begin
        if (wr_issued - rd_done < WORDS) begin
          wen = 1'b0;
          sample = {sample[WIDTH-2:0], sample[WIDTH-1] ^ sample[WIDTH-3] ^ sample[WIDTH-4] ^ sample[WIDTH-6]};
          d = sample;
        end else stalls++;
      end
      @(posedge clk_w);
      if (pending) wr_done++;
      pending = !cen && !wen;
      if (pending) begin wr_issued++; exp_q.push_back(d); end
    end
  end

  // Processor: drains the FIFO once it is nearly full.
  initial begin : processor
    bit pending = 0;
    logic [WIDTH-1:0] exp = '0;
    forever begin
      @(negedge clk_r);
      if (pending) check("sample read in order", q === exp);
      if (!draining && sensing && (wr_done - rd_done) >= int'(WORDS - MARGIN)) begin
        draining = 1; burst_words = 0; burst_cycles = 0;
      end
      ren = 1'b1;
      if (draining) begin
        if (wr_done - rd_issued > 0) ren = 1'b0;
        else begin   // caught up with the sensor: the drain ends
          draining = 0; drains++;
          check("drain read one word per read clock", burst_cycles == burst_words);
        end
      end
      @(posedge clk_r);
      if (cen) n_standby++;
      else if (u_fifo.u_read_ctrl.read && u_fifo.u_write_ctrl.write) n_both++;
      else if (u_fifo.u_write_ctrl.write) n_wr_only++;
      else if (u_fifo.u_read_ctrl.read) n_rd_only++;
      else n_idle++;
      if (pending) rd_done++;
      pending = !cen && !ren;
      if (draining) begin
        burst_cycles++;
        if (pending) burst_words++;
      end
      if (pending) begin rd_issued++; exp = exp_q.pop_front(); end
    end
  end

  initial begin : scenario
    longint total;
    #(TW * 4);                 // standby before gathering
    cen = 1'b0;
    #(TW * 2);
    sensing = 1;
    wait (drains == ROUNDS);
    sensing = 0;
    wait (wr_done == wr_issued);
    // final drain of what is left
    @(negedge clk_r); draining = 1; burst_words = 0; burst_cycles = 0;
    wait (drains == ROUNDS + 1);
    repeat (4) @(posedge clk_w);
    check("all words switched off when empty", &u_fifo.u_power_ctrl.ctrl_cell);
    cen = 1'b1;
    #(TW * 4);                 // standby after
    check("every sample read", exp_q.size() == 0 && rd_done == wr_issued);
    check("sensor never stalled on a full FIFO", stalls == 0);
    check("reads and writes overlapped", n_both > 0);
    total = n_standby + n_wr_only + n_both + n_rd_only + n_idle;
    $display("[%0d words] %0d samples, %0d drains; read-clock cycles: standby %0d, write only %0d, read+write %0d, read only %0d, idle %0d (total %0d)",
             WORDS, wr_issued, drains, n_standby, n_wr_only, n_both, n_rd_only, n_idle, total);
    $display("[%0d words] share of time with a write pulse active: %0d%%, with a read active: %0d%%",
             WORDS, int'(100 * (n_wr_only + n_both) / total), int'(100 * (n_both + n_rd_only) / total));
    done = 1'b1;
  end
endmodule
