// tb_wsn_data_gathering: sensor-node data gathering workload on the FIFO.
// Runs the same scenario (wsn_gathering_run) on the default 256 x 16 FIFO and
// on the 512 x 16 size the node's system study prefers: continuous 200 kHz
// sample writes, a 5 MHz drain whenever the FIFO is nearly full while writes
// go on, standby before and after. Both runs check every sample, the
// one-word-per-read-clock drain rate and the power-off of empty words, and
// report the time spent in each operating mode.
module tb_wsn_data_gathering;
  int   c256, f256, c512, f512;
  logic d256, d512;
  int   checks = 0, failures = 0;

  wsn_gathering_run #(.WORDS(256)) run256 (.checks(c256), .failures(f256), .done(d256));
  wsn_gathering_run #(.WORDS(512)) run512 (.checks(c512), .failures(f512), .done(d512));

  initial begin
    #(64'd5000 * 64'd20000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c256 + c512, failures + f256 + f512);
    $finish;
  end

  initial begin
    #1;
    wait (d256 === 1'b1 && d512 === 1'b1);
    checks++;
    if (c256 == 0 || c512 == 0) begin failures++; $display("FAIL a run made no checks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + c256 + c512, failures + f256 + f512);
    $finish;
  end
endmodule
