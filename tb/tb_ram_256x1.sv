// tb_ram_256x1 -- self-check of the 256 x 1 RAM primitive.
// Checks the INIT contents at power-up (an alternating pattern), then runs
// random writes and reads against a bit-array reference.  Reads are checked
// before the next clock edge, so a read that needed a clock would fail;
// a write is checked to land only at its own address.
module tb_ram_256x1;
  localparam logic [255:0] PATTERN = {64{4'b1001}} ^ {128'h0, {32{4'hA}}};
  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [7:0] a = '0;
  logic       d = 1'b0;
  logic       o;
  logic       model [256];
  int checks = 0, failures = 0;

  ram_256x1 #(.AW(8), .INIT(PATTERN)) dut (.clk(clk), .we(we), .a(a), .d(d), .o(o));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [7:0] addr);
    a = addr;
    #1;
    checks++;
    if (o !== model[addr]) begin
      failures++;
      $display("FAIL read a=%0d o=%b expected %b", addr, o, model[addr]);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) model[i] = PATTERN[i];
    @(negedge clk);
    for (int i = 0; i < 256; i++) check_read(8'(i));
    // random writes, each followed by reads of the same and another address
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a  = 8'($urandom);
      d  = 1'($urandom);
      we = ($urandom % 3) != 0;
      @(posedge clk);
      if (we) model[a] = d;
      #1 we = 1'b0;
      check_read(a);
      check_read(8'($urandom));
    end
    for (int i = 0; i < 256; i++) check_read(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
