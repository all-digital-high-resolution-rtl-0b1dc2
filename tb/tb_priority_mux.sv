// tb_priority_mux: self-checking test of the priority multiplexer.
//
// Two instances: N = 4, checked exhaustively over all 256 input pairs, and
// N = 16 (the prototype size), checked on every single-bit selection, the
// all-zero selection and 20000 random vectors. The expected output is found
// independently of the loop in the design: the lowest set selection bit is
// isolated with s & -s and its index taken with $clog2; the output must be
// d[N-1-k], or 0 when s is 0.
module tb_priority_mux;

  int checks   = 0;
  int failures = 0;

  logic [3:0]  d4, s4;
  logic        x4;
  logic [15:0] d16, s16;
  logic        x16;

  priority_mux #(.N(4))  dut4  (.d(d4),  .s(s4),  .x(x4));
  priority_mux           dut16 (.d(d16), .s(s16), .x(x16));

  function automatic logic expect_x(input logic [15:0] d, input logic [15:0] s, input int n);
    logic [15:0] iso;
    int k;
    if (s == 0) return 1'b0;
    iso = s & (~s + 16'd1);
    k = $clog2(iso);
    return d[n-1-k];
  endfunction

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        d4 = 4'(i); s4 = 4'(j);
        #1;
        checks++;
        if (x4 !== expect_x({12'b0, d4}, {12'b0, s4}, 4)) begin
          failures++;
          $display("N=4 mismatch d=%b s=%b x=%b", d4, s4, x4);
        end
      end

    d16 = 16'hFFFF; s16 = 16'h0000; #1;
    checks++;
    if (x16 !== 1'b0) begin failures++; $display("N=16 all-zero selection gave 1"); end

    for (int k = 0; k < 16; k++) begin
      for (int b = 0; b < 2; b++) begin
        d16 = b ? (16'h1 << (15 - k)) : ~(16'h1 << (15 - k));
        s16 = (16'h1 << k) | (16'($urandom) << (k + 1));
        #1;
        checks++;
        if (x16 !== 1'(b)) begin
          failures++;
          $display("N=16 select bit %0d: d=%h s=%h x=%b", k, d16, s16, x16);
        end
      end
    end

    for (int t = 0; t < 20000; t++) begin
      d16 = 16'($urandom); s16 = 16'($urandom);
      #1;
      checks++;
      if (x16 !== expect_x(d16, s16, 16)) begin
        failures++;
        if (failures < 10) $display("N=16 mismatch d=%h s=%h x=%b", d16, s16, x16);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
