// tb_csa_split: checks the split 3:2 carry-save row.
//
// Exhaustive at W = 4 (all x, y, z, cin) and random at W = 60: the outputs
// must satisfy s + c = x + y + z + cin modulo 2^W, s must be the bitwise
// sum x ^ y ^ z, and the carry LSB must be cin.
module tb_csa_split;

  logic [3:0]  x4, y4, z4, s4, c4;
  logic        cin4;
  logic [59:0] x, y, z, s, c;
  logic        cin;
  int checks = 0, failures = 0;

  csa_split #(.W(4))  dut4 (.x(x4), .y(y4), .z(z4), .cin(cin4), .s(s4), .c(c4));
  csa_split #(.W(60)) dut  (.x(x), .y(y), .z(z), .cin(cin), .s(s), .c(c));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8192; i++) begin
      {cin4, x4, y4, z4} = 13'(i);
      #1;
      checks++;
      if (4'(s4 + c4) !== 4'(x4 + y4 + z4 + 4'(cin4)) || s4 !== (x4 ^ y4 ^ z4) || c4[0] !== cin4) begin
        failures++;
        if (failures < 5) $display("W=4 %h %h %h %b -> %h %h", x4, y4, z4, cin4, s4, c4);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      x = {$urandom(), $urandom()};
      y = {$urandom(), $urandom()};
      z = {$urandom(), $urandom()};
      cin = 1'($urandom());
      #1;
      checks++;
      if (60'(s + c) !== 60'(x + y + z + 60'(cin))) begin
        failures++;
        if (failures < 5) $display("W=60 mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
