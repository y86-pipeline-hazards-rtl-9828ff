// addq_pipe_tb: runs addq programs through the four-stage addq pipeline and
// checks every register write against a sequential model (registers start
// at 100*n). Includes the lecture's example addq %r8,%r9 ; addq %r9,%r8,
// where %r9 must be forwarded (1700) and %r8 must become 2500, and its
// variant (2b) with addq %r10,%r9. Writes must appear one per cycle
// starting 3 cycles after the fetch of the first instruction (no stalls).
// Counts both forwarding paths and fails if either never acted.
module addq_pipe_tb;
  logic        clk = 0, rst = 1, load_we = 0;
  logic [7:0]  load_addr = '0, load_data = '0;
  logic [63:0] pc;
  logic        wb_valid, fwd_e, fwd_w;
  logic [3:0]  wb_dst;
  logic [63:0] wb_val;
  logic [63:0] model [15];
  logic [7:0]  prog [256];
  int checks = 0, failures = 0, n_fwd_e = 0, n_fwd_w = 0;

  addq_pipe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  // load prog (n instructions), run n cycles of writeback and compare
  task automatic run(int n, string name);
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); load_we = 1; load_addr = 8'(a); load_data = prog[a];
    end
    @(negedge clk); load_we = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 15; i++) model[i] = 64'(100 * i);
    // instruction k is fetched in cycle k and written back in cycle k+3
    for (int c = 0; c < n + 3; c++) begin
      @(negedge clk);
      n_fwd_e += int'(fwd_e); n_fwd_w += int'(fwd_w);
      if (c < 3) chk(64'(wb_valid), 0, {name, ": no write while filling"});
      else begin
        int k = c - 3;
        logic [3:0] ra, rb;
        {ra, rb} = prog[2 * k + 1];
        chk(64'(wb_valid), 64'(rb != 4'hF), {name, ": write valid"});
        if (rb != 4'hF) begin
          model[rb] = model[rb] + ((ra == 4'hF) ? 64'd0 : model[ra]);
          chk(64'(wb_dst), 64'(rb), {name, ": write register"});
          chk(wb_val, model[rb], $sformatf("%s: instr %0d value", name, k));
        end
      end
    end
  endtask

  initial begin
    // lecture example: addq %r8,%r9 ; addq %r9,%r8
    foreach (prog[i]) prog[i] = 8'h00;
    prog[0] = 8'h60; prog[1] = 8'h89;
    prog[2] = 8'h60; prog[3] = 8'h98;
    run(2, "example");
    @(posedge clk); #1;   // last write lands at this edge
    chk(dut.u_rf.regs[9], 64'd1700, "R9 = 1700");
    chk(dut.u_rf.regs[8], 64'd2500, "R8 = 800 + 1700");
    // (2b): addq %r8,%r9 ; addq %r10,%r9
    prog[3] = 8'hA9;
    run(2, "example 2b");
    @(posedge clk); #1;
    chk(dut.u_rf.regs[9], 64'd2700, "R9 = 1700 + 1000");
    // multiple forwarding paths: addq %r10,%r8 ; addq %r11,%r8 ; addq %r12,%r8
    prog[1] = 8'hA8; prog[3] = 8'hB8; prog[4] = 8'h60; prog[5] = 8'hC8;
    run(3, "multiple paths (1)");
    // random programs
    for (int t = 0; t < 20; t++) begin
      foreach (prog[i]) prog[i] = (i % 2 == 0) ? 8'h60 : 8'($urandom_range(14) * 16 + $urandom_range(14));
      run(120, $sformatf("random %0d", t));
    end
    $display("events: forward_from_execute=%0d forward_from_writeback=%0d", n_fwd_e, n_fwd_w);
    chk(64'(n_fwd_e > 0), 1, "forwarding from execute never happened");
    chk(64'(n_fwd_w > 0), 1, "forwarding from writeback never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
