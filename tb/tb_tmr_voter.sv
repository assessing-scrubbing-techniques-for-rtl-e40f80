// tb_tmr_voter: exhaustive check of the 2-of-3 voter on a 3-bit slice and a
// random check at the full 128-bit width, including the per-input mismatch
// flags.  Expected values come from counting ones per bit position.
`timescale 1ns/1ps
module tb_tmr_voter;
  logic [127:0] a, b, c, v;
  logic [2:0]   m;
  int checks = 0, failures = 0;

  tmr_voter #(.WIDTH(128)) dut (.in0(a), .in1(b), .in2(c), .voted(v), .mismatch(m));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply_and_check();
    logic [127:0] e;
    #1;
    for (int i = 0; i < 128; i++) e[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
    check(v === e, "voted");
    check(m === {c != e, b != e, a != e}, "mismatch");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 512; p++) begin
      a = 128'(p[2:0]); b = 128'(p[5:3]); c = 128'(p[8:6]);
      apply_and_check();
    end
    for (int n = 0; n < 200; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = a; c = a;
      case (n % 4)
        0: b[$urandom % 128] ^= 1'b1;            // one input upset: masked
        1: begin b = ~a; c = {$urandom, $urandom, $urandom, $urandom}; end
        2: c ^= {$urandom, $urandom, $urandom, $urandom};
        default: ;
      endcase
      apply_and_check();
      if (n % 4 == 0 || n % 4 == 2) check(v === a, "single faulty input masked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
