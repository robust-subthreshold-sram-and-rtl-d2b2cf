// tb_sram7t_cell: self-checking testbench of the 7T cell model. Writes 0 and
// 1 through the write port, holds, reads through the read buffer with the
// foot at ground and at VDD, and removes the supply to check that the data
// are lost.
module tb_sram7t_cell;
  logic v_vdd = 1'b1, v_gnd = 1'b1, wwl = 1'b0, wbl = 1'b0, rwl = 1'b0;
  logic rbl_pd;
  int   checks = 0, failures = 0;

  sram7t_cell dut (.v_vdd(v_vdd), .v_gnd(v_gnd), .wwl(wwl), .wbl(wbl), .rwl(rwl),
                   .rbl_pd(rbl_pd));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic write_bit(logic b);
    wbl = b; #1 wwl = 1'b1; #1 wwl = 1'b0; #1 wbl = ~b; #1;
  endtask

  task automatic read_expect(string what, logic b);
    rwl = 1'b1; v_gnd = 1'b0; #1;
    check(what, rbl_pd, b);
    rwl = 1'b0; v_gnd = 1'b1; #1;
    check({what, " (idle bitline)"}, rbl_pd, 1'b0);
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 50; i++) begin
      logic b;
      b = $urandom_range(0, 1);
      write_bit(b);
      read_expect("read after write", b);
      read_expect("second read (non-destructive)", b);
    end
    write_bit(1'b1);
    rwl = 1'b1; #1;                  // foot still at VDD: no read path
    check("read with foot at VDD", rbl_pd, 1'b0);
    rwl = 1'b0; #1;
    v_vdd = 1'b0; #1; v_vdd = 1'b1; #1;  // word switched off and on again
    read_expect("data lost after power-off", 1'b0);
    v_vdd = 1'b0; wbl = 1'b1; wwl = 1'b1; #1; wwl = 1'b0; v_vdd = 1'b1; #1;
    read_expect("no write without supply", 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
