// tb_div_final: checks residual assimilation, correction, normalisation and
// rounding.
//
// For random normalised x and d it forms the exact truncated quotient
// Qint = floor(x 2^(QW-2) / d) and remainder R, then presents either
// (Q = Qint, residual R) or (Q = Qint + 1, residual R - d), with
// QM = Q - 1 and the residual split randomly into two carry-save vectors.
// The registered output must equal the round-to-nearest-even quotient
// computed by exact integer division, with the x < d flag and inexact flag.
module tb_div_final;

  localparam int N  = 53;
  localparam int F  = N + 4;
  localparam int W  = F + 3;
  localparam int QW = 56;

  logic          clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0]  ws = '0, wc = '0;
  logic [QW-1:0] qq = '0, qm = '0;
  logic [N-1:0]  q_sig;
  logic          q_lt1, inexact;
  int checks = 0, failures = 0;
  int nneg = 0, nup = 0;

  div_final #(.N(N), .QW(QW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [N-1:0] xa, input logic [N-1:0] da, input bit negres);
    logic [127:0] a, qi, rem, num, qt, rm;
    logic [W-1:0] w, split;
    logic [N-1:0] exp_sig;
    logic exp_lt1, up;
    a   = 128'(xa) << (QW - 2);
    qi  = a / 128'(da);
    rem = a % 128'(da);
    w   = W'(rem) << (F - N);
    if (negres) begin
      qi = qi + 1;
      w  = w - (W'(da) << (F - N));
      nneg++;
    end
    split = {$urandom(), $urandom()};
    wc = split;
    ws = w - split;
    qq = QW'(qi);
    qm = QW'(qi - 1);
    exp_lt1 = (xa < da);
    num = exp_lt1 ? (128'(xa) << N) : (128'(xa) << (N - 1));
    qt  = num / 128'(da);
    rm  = num % 128'(da);
    up  = (2 * rm > 128'(da)) || ((2 * rm == 128'(da)) && qt[0]);
    if (up) nup++;
    exp_sig = N'(qt + 128'(up));
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (q_sig !== exp_sig || q_lt1 !== exp_lt1 || inexact !== (rm != 0)) begin
      failures++;
      if (failures < 5) $display("x=%h d=%h neg=%b got %h %b %b exp %h %b %b", xa, da, negres,
                                 q_sig, q_lt1, inexact, exp_sig, exp_lt1, rm != 0);
    end
    // with en low the output must hold
    ws = ~ws; qq = ~qq;
    @(negedge clk);
    checks++;
    if (q_sig !== exp_sig) begin failures++; $display("output not held"); end
  endtask

  initial begin
    logic [63:0] r1, r2;
    logic [N-1:0] h;
    h = N'(1) << (N - 1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(h, h, 1'b0);
    one('1, '1, 1'b0);
    one('1, h, 1'b0);
    one(h, '1, 1'b1);
    one(h | 3, h | 2, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      r1 = {$urandom(), $urandom()};
      r2 = {$urandom(), $urandom()};
      one(N'(r1) | h, N'(r2) | h, 1'($urandom()));
    end
    checks += 2;
    if (nneg == 0) begin failures++; $display("no negative residual case"); end
    if (nup == 0)  begin failures++; $display("no round-up case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
