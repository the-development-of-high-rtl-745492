// tb_inv_clarke: checks the alpha/beta -> a/b/c transform against a
// floating-point model on directed and random references (tolerance 2 LSB
// of Q14).
module tb_inv_clarke;
  import npc_pkg::*;
  q14_t alpha, beta;
  logic signed [17:0] va, vb, vc;
  int checks = 0, failures = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  inv_clarke dut (.alpha(alpha), .beta(beta), .va(va), .vb(vb), .vc(vc));

  task automatic check_one(input int a, input int b);
    real ea, eb, ec;
    alpha = q14_t'(a);
    beta  = q14_t'(b);
    #1;
    ea = a;
    eb = -0.5 * a + 0.8660254037844386 * b;
    ec = -0.5 * a - 0.8660254037844386 * b;
    checks++;
    if (rabs(real'(va) - ea) > 2.0 || rabs(real'(vb) - eb) > 2.0 || rabs(real'(vc) - ec) > 2.0) begin
      failures++;
      $display("FAIL a=%0d b=%0d got %0d %0d %0d exp %f %f %f", a, b, va, vb, vc, ea, eb, ec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16384, 0);
    check_one(0, 16384);
    check_one(-16384, 0);
    check_one(0, -16384);
    check_one(32767, 32767);
    check_one(-32768, -32768);
    for (int k = 0; k < 2000; k++)
      check_one(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    // a, b, c must sum to (about) zero
    for (int k = 0; k < 200; k++) begin
      alpha = q14_t'($urandom); beta = q14_t'($urandom); #1;
      checks++;
      if (rabs(real'(int'(va) + int'(vb) + int'(vc))) > 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
