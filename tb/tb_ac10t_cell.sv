// tb_ac10t_cell: self-checking testbench of the auto-compensation 10T cell
// model. Writes random data in write mode (WL1 = WL2 = 1, VGND = VDD), holds
// (WL1 = 1, WL2 = 0, VGND = GND) and reads (WL1 = 0, WL2 = 1, VGND = GND),
// checking that exactly the bitline on the side storing 1 is discharged and
// that no other mode disturbs the data or the bitlines.
module tb_ac10t_cell;
  logic wl1 = 1'b1, wl2 = 1'b0, vgnd = 1'b0, bl = 1'b1, br = 1'b1;
  logic bl_pd, br_pd;
  logic stored = 1'b0;
  int   checks = 0, failures = 0;

  ac10t_cell dut (.wl1(wl1), .wl2(wl2), .vgnd(vgnd), .bl(bl), .br(br),
                  .bl_pd(bl_pd), .br_pd(br_pd));

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic set_mode(logic a, logic b, logic g);
    wl1 = a; wl2 = b; vgnd = g; #1;
  endtask

  task automatic do_write(logic v);
    bl = v; br = ~v;
    set_mode(1, 1, 1);
    set_mode(1, 0, 0);
    bl = 1'b1; br = 1'b1; #1;
    stored = v;
  endtask

  task automatic do_read(string what);
    set_mode(0, 1, 0);
    check(what, {bl_pd, br_pd}, {stored, ~stored});
    set_mode(1, 0, 0);
    check({what, ": hold leaves bitlines"}, {bl_pd, br_pd}, 2'b00);
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
    for (int i = 0; i < 40; i++) begin
      do_write($urandom_range(0, 1));
      do_read("read after write");
      // modes outside the operation table keep the data
      bl = ~stored; br = stored;
      set_mode(1, 1, 0);       // wordlines on without write assist
      set_mode(0, 0, 1);
      set_mode(0, 1, 1);       // read wordline with VGND high: no read path
      check("no discharge with VGND high", {bl_pd, br_pd}, 2'b00);
      set_mode(1, 0, 0);
      bl = 1'b1; br = 1'b1;
      do_read("read after other modes");
    end
    // write with equal bitlines carries no data
    bl = 1'b0; br = 1'b0; set_mode(1, 1, 1); set_mode(1, 0, 0); bl = 1'b1; br = 1'b1;
    do_read("equal bitlines do not write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
