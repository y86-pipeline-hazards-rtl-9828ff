// pipe_reg_tb: checks the stall/bubble pipeline register.
//
// First replays the lecture's exercise: an 8-bit register "B" with default
// 0xFF fed with 0x01, 0x02, ... and the given stall/bubble pattern, and
// compares the register output with the worked answer. Then drives a
// struct-typed bank with random inputs and controls against a one-line
// model (stall keeps, bubble loads the default, otherwise load).
module pipe_reg_tb;
  logic       clk = 0, rst = 1;
  logic       stall = 0, bubble = 0;
  logic [7:0] d = '0, q;

  typedef struct packed { logic [3:0] icode; logic [11:0] val; } s_t;
  localparam s_t SDEF = '{icode: 4'h1, val: 12'hABC};
  logic s_stall = 0, s_bubble = 0;
  s_t   sd, sq, model;

  int checks = 0, failures = 0;

  pipe_reg #(.T(logic [7:0]), .DEFAULT(8'hFF)) dut (
    .clk(clk), .rst(rst), .stall(stall), .bubble(bubble), .d(d), .q(q));
  pipe_reg #(.T(s_t), .DEFAULT(SDEF)) dut_s (
    .clk(clk), .rst(rst), .stall(s_stall), .bubble(s_bubble), .d(sd), .q(sq));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exercise: time, stall_B, bubble_B and the expected B_value
  logic [7:0] exp_b [9] = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};
  logic       st [8]    = '{0, 1, 0, 0, 0, 0, 1, 1};
  logic       bu [8]    = '{0, 0, 0, 1, 0, 0, 0, 0};

  initial begin
    sd = '0;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t <= 8; t++) begin
      checks++;
      if (q !== exp_b[t]) begin
        failures++;
        $display("FAIL: time %0d B=%02h expected %02h", t, q, exp_b[t]);
      end
      if (t < 8) begin
        d = 8'(t + 1); stall = st[t]; bubble = bu[t];
        @(posedge clk); #1;
      end
    end
    stall = 0; bubble = 0;

    // random struct-typed bank
    model = sq;
    for (int i = 0; i < 2000; i++) begin
      sd = s_t'($urandom);
      case ($urandom_range(3))
        0: begin s_stall = 1; s_bubble = 0; end
        1: begin s_stall = 0; s_bubble = 1; end
        default: begin s_stall = 0; s_bubble = 0; end
      endcase
      if (s_stall)       model = model;
      else if (s_bubble) model = SDEF;
      else               model = sd;
      @(posedge clk); #1;
      checks++;
      if (sq !== model) begin
        failures++;
        $display("FAIL: struct bank %h expected %h", sq, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
