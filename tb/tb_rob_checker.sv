// tb_rob_checker: random pointer values, half of them legal, against the
// bounds rules worked out here; each case starts from reset and the sticky
// error flag must rise exactly for the illegal cases.
`timescale 1ns/1ps
module tb_rob_checker;
  localparam int NT = 4, ROB_N = 16, RBW = 4;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  logic [RBW-1:0] mfp, mrp; logic [RBW:0] free;
  logic [NT-1:0] tfp_valid; logic [NT-1:0][RBW-1:0] tfp;
  logic err;
  int checks = 0, failures = 0;
  rob_checker #(.NT(NT), .ROB_N(ROB_N)) dut (.*);
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nbad = 0;
    for (int n = 0; n < 1500; n++) begin
      int used; logic exp_bad;
      @(negedge clk); rst_n = 0;
      used = $urandom_range(0, ROB_N);
      mfp = RBW'($urandom);
      mrp = RBW'(mfp + used);
      free = (RBW+1)'(ROB_N - used);
      tfp_valid = '0; tfp = '0;
      for (int t = 0; t < NT; t++)
        if (used > 0 && $urandom_range(0, 1) != 0) begin
          tfp_valid[t] = 1; tfp[t] = RBW'(mfp + $urandom_range(0, used - 1));
        end
      exp_bad = 0;
      case ($urandom_range(0, 3))
        0: begin free = free + 1; exp_bad = (free != 0); end     // count off by one
        1: if (used < ROB_N - 1) begin                              // a pointer beyond the rear
             tfp_valid[0] = 1; tfp[0] = RBW'(mrp + $urandom_range(1, ROB_N - used - 1)); exp_bad = 1;
           end
        default: ;
      endcase
      if (used == 0 && tfp_valid != 0) exp_bad = 1;
      @(negedge clk); rst_n = 1;
      @(negedge clk);
      checks++;
      if (err !== exp_bad) begin
        failures++;
        if (failures < 5) $display("mfp %0d mrp %0d free %0d tfp0 %0d v%b: err %b exp %b", mfp, mrp, free, tfp[0], tfp_valid, err, exp_bad);
      end
      if (exp_bad) nbad++;
    end
    checks++;
    if (nbad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
