// tb_m4_1e -- exhaustive self-check of the 4-to-1 multiplexer with enable.
// All 128 combinations of d, s and e are applied; the expected output is
// worked out bit by bit (enable low forces 0, otherwise bit s of d).
module tb_m4_1e;
  logic [3:0] d;
  logic [1:0] s;
  logic       e;
  logic       o;
  int checks = 0, failures = 0;

  m4_1e dut (.d(d), .s(s), .e(e), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 128; v++) begin
      {e, s, d} = 7'(v);
      #1;
      case (s)
        2'd0: expected = d[0];
        2'd1: expected = d[1];
        2'd2: expected = d[2];
        default: expected = d[3];
      endcase
      expected = expected & e;
      checks++;
      if (o !== expected) begin
        failures++;
        $display("FAIL d=%b s=%0d e=%b o=%b expected %b", d, s, e, o, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
