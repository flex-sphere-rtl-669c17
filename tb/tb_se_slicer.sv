// tb_se_slicer: self-checking test of the Schnorr-Euchner slicer.
//
// Drives a new b and q every cycle: random values between -12 and 12, exact
// integers and exact odd/even half points, with q drawn from {1, 3, 7}. The
// expected point is worked out in real arithmetic: the nearest odd integer
// to b (a b exactly between two odd integers goes up), clipped to [-q, q].
// Each output is compared 5 cycles after its input, the slicer's latency.
module tb_se_slicer;
  import flex_pkg::*;
  localparam int BW = ZW + DW;
  localparam int BF = FR + FRI;
  localparam int N  = 4000;
  localparam int L  = 5;

  logic                 clk = 1'b0;
  logic signed [BW-1:0] b;
  q_t                   q;
  sym_t                 s;
  int                   checks = 0, failures = 0;
  int                   exp_q [$];

  se_slicer dut (.clk, .b, .q, .s);

  always #5 clk = ~clk;

  function automatic int expect_s(input logic signed [BW-1:0] bv, input q_t qv);
    real x;
    int  n;
    x = real'(bv) / real'(64'(1) << BF);
    n = 2 * int'($floor((x + 1.0) / 2.0 + 0.5)) - 1;
    if (n < -int'(qv)) n = -int'(qv);
    if (n >  int'(qv)) n =  int'(qv);
    return n;
  endfunction

  function automatic q_t rand_q();
    case ($urandom_range(2))
      0:       return 3'd1;
      1:       return 3'd3;
      default: return 3'd7;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = '0;
    q = 3'd7;
    for (int t = 0; t < N + L; t++) begin
      @(negedge clk);
      if (t >= L) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(s) != e) begin
          failures++;
          if (failures < 10) $display("mismatch at input %0d: got %0d expected %0d", t - L, s, e);
        end
      end
      if (t < N) begin
        case ($urandom_range(3))
          0: b = BW'($signed(int'($urandom_range(24 << 12)) - (12 << 12))) <<< (BF - 12);
          1: b = BW'($signed(int'($urandom_range(24)) - 12)) <<< BF;
          2: b = (BW'($signed(int'($urandom_range(48)) - 24)) <<< (BF - 1));
          default: b = BW'($signed(int'($urandom_range(2000)) - 1000)) <<< (BF - 6);
        endcase
        q = rand_q();
        exp_q.push_back(expect_s(b, q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
