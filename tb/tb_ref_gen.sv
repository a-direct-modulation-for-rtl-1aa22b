// tb_ref_gen: steps the reference generator with a random phase step and
// amplitude and compares each of the three outputs with
// q*cos(2*pi*theta/2^32 - j*2*pi/3), theta being the phase before the step
// (tracked in the testbench). The tolerance covers the 1024-entry table's
// angle resolution: q*2*pi/1024 plus 2 LSB. It also checks that the
// outputs hold without en.
module tb_ref_gen;
  import davpwm_pkg::*;

  localparam int unsigned NOUT = 3;

  localparam real PI = 3.14159265358979;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] step;
  q15_t        q, vo_x [NOUT];
  int          checks = 0, failures = 0;

  ref_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] theta;
    step = 0; q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    theta = 0;
    for (int r = 0; r < 4; r++) begin
      step = $urandom;
      q    = q15_t'($urandom % 32768);
      for (int n = 0; n < 500; n++) begin
        @(negedge clk);
        en = 1;
        @(negedge clk);
        en = 0;
        for (int j = 0; j < 3; j++) begin
          real e, tol;
          e   = q * $cos(2.0 * PI * real'(theta) / 4294967296.0 - j * 2.0 * PI / 3.0);
          tol = q * 2.0 * PI / 1024.0 + 2.0;
          checks++;
          if ((vo_x[j] - e) > tol || (e - vo_x[j]) > tol) begin
            failures++;
            if (failures < 10) $display("FAIL j=%0d got %0d exp %f", j, vo_x[j], e);
          end
        end
        theta = theta + step;
      end
      begin
        q15_t h0;
        h0 = vo_x[0];
        repeat (5) @(posedge clk);
        checks++;
        if (vo_x[0] != h0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
