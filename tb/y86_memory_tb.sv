// y86_memory_tb: checks the byte memory's three ports against a byte-array
// model: loads through the load port, little-endian 8-byte data reads and
// writes, 10-byte fetches, and the error flags at the upper edge.
module y86_memory_tb;
  localparam int N = 1024;
  logic        clk = 0;
  logic [63:0] fetch_addr = '0, data_addr = '0, data_wdata = '0, load_addr = '0;
  logic [79:0] fetch_bytes;
  logic        fetch_err, data_err, data_re = 0, data_we = 0, load_we = 0;
  logic [63:0] data_rdata;
  logic [7:0]  load_data = '0;
  logic [7:0]  model [N];
  int checks = 0, failures = 0;

  y86_memory #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [79:0] got, logic [79:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [79:0] mread(int a, int n);
    logic [79:0] v = '0;
    for (int i = 0; i < n; i++) v[8*i +: 8] = model[a + i];
    return v;
  endfunction

  initial begin
    for (int a = 0; a < N; a++) begin
      model[a] = 8'($urandom);
      @(negedge clk); load_we = 1; load_addr = 64'(a); load_data = model[a];
    end
    @(negedge clk); load_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int fa, da;
      fa = $urandom_range(N - 1);
      da = $urandom_range(N - 1);
      fetch_addr = 64'(fa); data_addr = 64'(da);
      data_re = 1; data_we = ($urandom_range(1) == 1); data_wdata = {$urandom, $urandom};
      #1;
      chk(80'(fetch_err), 80'(fa > N - 10), "fetch_err");
      if (fa <= N - 10) chk(fetch_bytes, mread(fa, 10), "fetch bytes");
      chk(80'(data_err), 80'(da > N - 8), "data_err");
      if (da <= N - 8) chk(80'(data_rdata), mread(da, 8), "data read");
      @(negedge clk);
      if (data_we && da <= N - 8)
        for (int i = 0; i < 8; i++) model[da + i] = data_wdata[8*i +: 8];
    end
    data_we = 0; data_re = 0; data_addr = 64'hFFFF_0000; #1;
    chk(80'(data_err), 80'(0), "no error without access");
    data_re = 1; #1;
    chk(80'(data_err), 80'(1), "error on far address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
