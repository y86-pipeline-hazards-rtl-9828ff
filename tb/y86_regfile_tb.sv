// y86_regfile_tb: checks the 15 x 64-bit register file against an array
// model: reset values, random writes on both ports (dstM wins a tie),
// REG_NONE writes ignored and read as 0, and that a read in the cycle of a
// write returns the old value.
module y86_regfile_tb;
  logic        clk = 0, rst = 1;
  logic [3:0]  src_a, src_b, dst_e, dst_m;
  logic [63:0] rval_a, rval_b, val_e, val_m;
  logic [63:0] model [16];
  int checks = 0, failures = 0;

  y86_regfile #(.INIT_STEP(64'd100)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    dst_e = 4'hF; dst_m = 4'hF; val_e = '0; val_m = '0; src_a = 0; src_b = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 15; i++) model[i] = 64'(100 * i);
    model[15] = '0;
    for (int i = 0; i < 16; i++) begin
      src_a = 4'(i); src_b = 4'(15 - i); #1;
      chk(rval_a, model[i], "reset value A");
      chk(rval_b, model[15 - i], "reset value B");
    end
    for (int n = 0; n < 3000; n++) begin
      dst_e = 4'($urandom); dst_m = ($urandom_range(3) == 0) ? dst_e : 4'($urandom);
      val_e = {$urandom, $urandom}; val_m = {$urandom, $urandom};
      src_a = 4'($urandom); src_b = dst_e;
      #1;
      chk(rval_a, model[src_a], "read A");
      chk(rval_b, model[src_b], "read B before write");
      @(posedge clk); #1;
      if (dst_e != 4'hF) model[dst_e] = val_e;
      if (dst_m != 4'hF) model[dst_m] = val_m;
      model[15] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
