// tb_ddpm_data_register: self-checking test of the input data register.
//
// Drives random data every clock with a random load enable and checks that
// the register takes din only on clocks where load is high, holds it
// otherwise, and reads 0 after reset.
module tb_ddpm_data_register;

  localparam int N = 16;

  int checks   = 0;
  int failures = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         load = 0;
  logic [N-1:0] din = '0;
  logic [N-1:0] q;
  logic [N-1:0] model;

  ddpm_data_register dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .q(q));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int loads;
    loads = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("q=%h after reset", q); end
    rst_n = 1;
    model = '0;
    for (int t = 0; t < 5000; t++) begin
      din  = N'($urandom);
      load = ($urandom % 4) == 0;
      @(posedge clk);
      if (load) begin model = din; loads++; end
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("t=%0d q=%h expected %h", t, q, model);
      end
    end
    checks++;
    if (loads < 100) begin failures++; $display("only %0d loads", loads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
