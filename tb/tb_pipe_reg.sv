// tb_pipe_reg: checks the stall/bubble register bank.
//
// Part 1 replays the stall/bubble exercise of the design: an 8-bit bank with
// default 0xFF fed 0x01, 0x02, ... with a fixed stall/bubble pattern; the
// expected register contents are the table's. Part 2 drives random inputs
// and controls against a one-line reference model.
module tb_pipe_reg;
  logic clk = 1'b0;
  logic rst, stall, bubble;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  pipe_reg #(.T(logic [7:0]), .DEFAULT(8'hFF)) dut (.clk, .rst, .stall, .bubble, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%02h expected %02h", what, q, exp);
    end
  endtask

  // exercise table: a_value, stall, bubble per time step; B_value expected
  logic [7:0] a_tab   [8] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08};
  logic       st_tab  [8] = '{0, 1, 0, 0, 0, 0, 1, 1};
  logic       bu_tab  [8] = '{0, 0, 0, 1, 0, 0, 0, 0};
  logic [7:0] exp_tab [9] = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};

  initial begin
    logic [7:0] model;
    rst = 1; stall = 0; bubble = 0; d = 0;
    @(posedge clk); #1 rst = 0;
    check(8'hFF, "after reset");
    for (int t = 0; t < 8; t++) begin
      check(exp_tab[t], $sformatf("table time %0d", t));
      d = a_tab[t]; stall = st_tab[t]; bubble = bu_tab[t];
      @(posedge clk); #1;
    end
    check(exp_tab[8], "table time 8");
    // random
    model = q;
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom);
      case ($urandom_range(0, 2))
        0: begin stall = 0; bubble = 0; end
        1: begin stall = 1; bubble = 0; end
        default: begin stall = 0; bubble = 1; end
      endcase
      @(posedge clk); #1;
      model = stall ? model : bubble ? 8'hFF : d;
      check(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
