// tb_des_core: known-answer test of the iterative DES/TDES core.
//
// Uses published DES test vectors (key 133457799BBCDFF1 on 0123456789ABCDEF
// gives 85E813540F0AB405; key 0E329232EA6D0D73 on 8787878787878787 gives 0),
// decrypts them back, and checks TDES through the identities
// EDE(k,k,k3) = DES(k3) and EDE(k1,k2,k2) = DES(k1), plus a TDES round trip
// with three different keys. The latency (17 cycles DES, 49 TDES: one load cycle plus the rounds) is checked.
module tb_des_core;
  logic clk = 0, rst_n = 0;
  logic start = 0, tdes = 0, decrypt = 0, busy, done;
  logic [63:0] k1, k2, k3, blk, result;
  int checks = 0, failures = 0;

  des_core dut (.clk, .rst_n, .start, .tdes, .decrypt, .k1, .k2, .k3,
                .block_in(blk), .busy, .done, .result);

  always #5 clk = ~clk;

  task automatic run(input logic t, input logic d, input logic [63:0] a, b, c, x,
                     output logic [63:0] y, output int cyc);
    @(negedge clk);
    tdes = t; decrypt = d; k1 = a; k2 = b; k3 = c; blk = x; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    y = result;
  endtask

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] y, z;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 0, 64'h133457799BBCDFF1, 0, 0, 64'h0123456789ABCDEF, y, cyc);
    check("DES enc vector 1", y, 64'h85E813540F0AB405);
    checks++; if (cyc != 17) begin failures++; $display("FAIL DES latency %0d", cyc); end
    run(0, 1, 64'h133457799BBCDFF1, 0, 0, 64'h85E813540F0AB405, y, cyc);
    check("DES dec vector 1", y, 64'h0123456789ABCDEF);
    run(0, 0, 64'h0E329232EA6D0D73, 0, 0, 64'h8787878787878787, y, cyc);
    check("DES enc vector 2", y, 64'h0000000000000000);
    run(1, 0, 64'hA1B2C3D4E5F60718, 64'hA1B2C3D4E5F60718, 64'h133457799BBCDFF1,
        64'h0123456789ABCDEF, y, cyc);
    check("TDES EDE(k,k,k3)", y, 64'h85E813540F0AB405);
    checks++; if (cyc != 49) begin failures++; $display("FAIL TDES latency %0d", cyc); end
    run(1, 0, 64'h0E329232EA6D0D73, 64'h5555AAAA3333CCCC, 64'h5555AAAA3333CCCC,
        64'h8787878787878787, y, cyc);
    check("TDES EDE(k1,k2,k2)", y, 64'h0);
    run(1, 1, 64'hA1B2C3D4E5F60718, 64'hA1B2C3D4E5F60718, 64'h133457799BBCDFF1,
        64'h85E813540F0AB405, y, cyc);
    check("TDES DED(k,k,k3)", y, 64'h0123456789ABCDEF);
    for (int i = 0; i < 4; i++) begin
      logic [63:0] a, b, c, x;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      x = {$urandom, $urandom};
      run(1, 0, a, b, c, x, y, cyc);
      run(1, 1, a, b, c, y, z, cyc);
      check("TDES round trip", z, x);
      checks++; if (y == x) begin failures++; $display("FAIL TDES identity"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
