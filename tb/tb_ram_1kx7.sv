// tb_ram_1kx7 -- self-check of the 1024 x 7 controller RAM.
// First the default contents: every one of the 1024 words is compared with
// an independent copy of the 20-step program (printed digit order, X0 and Y0
// leftmost, reversed here), 0 elsewhere.  Then random 7-bit writes are
// checked against a reference array, and the whole RAM is swept again.
module tb_ram_1kx7;
  localparam int unsigned DEPTH = 1024;

  localparam logic [9:0] PX [20] = '{
    10'b1000000101, 10'b1000001001, 10'b1000001010, 10'b1000000110,
    10'b1001100110, 10'b1001001010, 10'b1001001001, 10'b1001011001,
    10'b1001010101, 10'b0000000101, 10'b0100000110, 10'b0100001010,
    10'b0100001001, 10'b0100000101, 10'b0110100101, 10'b0110001001,
    10'b0110001010, 10'b0110011010, 10'b0110010110, 10'b0000000110};
  localparam logic [6:0] PY [20] = '{
    7'b0010010, 7'b0100010, 7'b0001010, 7'b0000010, 7'b0010010,
    7'b1000011, 7'b0000010, 7'b0001010, 7'b0000110, 7'b0000000,
    7'b0010010, 7'b1000010, 7'b0001010, 7'b0000010, 7'b0010010,
    7'b0100011, 7'b0000010, 7'b0001010, 7'b0000110, 7'b0000000};

  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [9:0] a = '0;
  logic [6:0] d = '0;
  logic [6:0] o;
  logic [6:0] model [DEPTH];
  int checks = 0, failures = 0;

  ram_1kx7 dut (.clk(clk), .we(we), .a(a), .d(d), .o(o));

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
      $display("FAIL read a=%b o=%b expected %b", addr, o, model[addr]);
    end
  endtask

  initial begin
    logic [9:0] ax;
    logic [6:0] dy;
    for (int i = 0; i < int'(DEPTH); i++) model[i] = '0;
    for (int s = 0; s < 20; s++) begin
      for (int k = 0; k < 10; k++) ax[k] = PX[s][9-k];
      for (int k = 0; k < 7; k++)  dy[k] = PY[s][6-k];
      model[ax] = dy;
    end
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) check_read(10'(i));
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a  = 10'($urandom);
      d  = 7'($urandom);
      we = 1'b1;
      @(posedge clk);
      model[a] = d;
      #1 we = 1'b0;
      check_read(a);
      check_read(10'($urandom));
    end
    for (int i = 0; i < int'(DEPTH); i++) check_read(10'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
