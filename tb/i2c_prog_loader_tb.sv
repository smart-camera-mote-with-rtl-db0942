// i2c_prog_loader_tb: self-checking test of the I2C program loader.
//
// A bit-banged I2C master (SCL period 16 system clocks, open-drain SDA)
// writes three 67-bit instruction words starting at program address 5, then
// sends the same framing to a different device address. Checks the ACK of
// every byte, one write pulse per word with the right address and data, and
// that the foreign transfer is neither acknowledged nor written.
module i2c_prog_loader_tb;
  localparam int IW = 67, NB = 9;

  logic clk = 0, rst_n = 0, scl, sda_m, sda_oe, prog_we, sda;
  logic [7:0] prog_addr;
  logic [IW-1:0] prog_wdata;
  int checks = 0, failures = 0, nwr = 0, nack = 0;
  logic [IW-1:0] words [3];

  assign sda = sda_m & ~sda_oe;

  i2c_prog_loader #(.DEV_ADDR(7'h2A), .IW(IW), .PCW(8)) dut (.clk, .rst_n, .scl, .sda, .sda_oe,
    .prog_we, .prog_addr, .prog_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0h exp %0h", s, got, exp); end
  endtask

  always @(posedge clk) if (rst_n && prog_we) begin
    chk("addr", prog_addr, 5 + nwr);
    checks++;
    if (nwr > 2 || prog_wdata !== words[nwr]) begin failures++; $display("FAIL word %0d", nwr); end
    nwr++;
  end

  task automatic q(); repeat (4) @(posedge clk); endtask
  task automatic i2c_start(); sda_m = 1; scl = 1; q(); sda_m = 0; q(); scl = 0; q(); endtask
  task automatic i2c_stop();  sda_m = 0; q(); scl = 1; q(); sda_m = 1; q(); endtask
  task automatic i2c_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; q(); scl = 1; q(); q(); scl = 0; q();
    end
    sda_m = 1; q(); scl = 1; q(); ack = !sda; q(); scl = 0; q();
  endtask

  task automatic send(logic [6:0] dev, bit exp_ack);
    bit ack;
    logic [NB*8-1:0] w;
    i2c_start();
    i2c_byte({dev, 1'b0}, ack); chk("dev ack", ack, exp_ack);
    i2c_byte(8'h00, ack); if (exp_ack) chk("ah ack", ack, 1);
    i2c_byte(8'h05, ack); if (exp_ack) chk("al ack", ack, 1);
    for (int k = 0; k < 3; k++) begin
      w = (NB*8)'(words[k]);
      for (int j = NB - 1; j >= 0; j--) begin
        i2c_byte(w[j*8 +: 8], ack);
        if (exp_ack) chk("data ack", ack, 1); else chk("no ack", ack, 0);
      end
    end
    i2c_stop();
  endtask

  initial begin
    scl = 1; sda_m = 1;
    for (int k = 0; k < 3; k++) words[k] = {3'($urandom), 32'($urandom), 32'($urandom)};
    repeat (3) @(posedge clk); rst_n = 1; q();
    send(7'h2A, 1);
    chk("written", nwr, 3);
    send(7'h11, 0);
    chk("foreign ignored", nwr, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
