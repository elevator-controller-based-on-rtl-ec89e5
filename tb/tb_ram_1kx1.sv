// tb_ram_1kx1 -- self-check of a 1024 x 1 data line (four 256 x 1 RAMs and
// a 4-to-1 multiplexer).
// Power-up contents come from a pattern that differs in each quarter, so a
// wrong quarter select or a wrong write decode shows up.  All 1024 bits are
// read, random writes are checked against a reference array, and a final
// sweep confirms that no write touched another quarter.
module tb_ram_1kx1;
  localparam int unsigned DEPTH = 1024;

  function automatic logic [DEPTH-1:0] make_pattern();
    logic [DEPTH-1:0] p;
    for (int i = 0; i < int'(DEPTH); i++)
      p[i] = ((i * 7 + (i >> 8) * 3) % 5) < 2;
    return p;
  endfunction
  localparam logic [DEPTH-1:0] PATTERN = make_pattern();

  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [9:0] a = '0;
  logic       d = 1'b0;
  logic       o;
  logic       model [DEPTH];
  int checks = 0, failures = 0;

  ram_1kx1 #(.INIT(PATTERN)) dut (.clk(clk), .we(we), .a(a), .d(d), .o(o));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [9:0] addr);
    a = addr;
    #1;
    checks++;
    if (o !== model[addr]) begin
      failures++;
      $display("FAIL read a=%0d o=%b expected %b", addr, o, model[addr]);
    end
  endtask

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) model[i] = PATTERN[i];
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) check_read(10'(i));
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a  = 10'($urandom);
      d  = 1'($urandom);
      we = 1'b1;
      @(posedge clk);
      model[a] = d;
      #1 we = 1'b0;
      check_read(a);
      check_read(a ^ 10'h100);   // same offset, neighbouring quarter
    end
    for (int i = 0; i < int'(DEPTH); i++) check_read(10'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
