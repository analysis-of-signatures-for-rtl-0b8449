// tb_obs_data_accum: self-checking test of the data accumulation unit.
//
// Random words with random gaps in in_valid are accumulated and compared with
// a running modulo-2^32 sum after every clock; clear is checked, and the same
// set of words in two different orders must give the same total.
module tb_obs_data_accum;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        clr, vld;
  logic [31:0] din, acc;
  logic [31:0] model;

  obs_data_accum dut (.clk(clk), .rst_n(rst_n), .clear(clr), .in_valid(vld),
                      .in_data(din), .accum(acc));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cyc(logic c, logic v, logic [31:0] d);
    @(negedge clk);
    clr = c; vld = v; din = d;
    if (c)      model = '0;
    else if (v) model = model + d;
    @(negedge clk);
    clr = 0; vld = 0;
    check("accum", acc, model);
  endtask

  initial begin
    logic [31:0] w [8];
    logic [31:0] fwd, rev;
    clr = 0; vld = 0; din = '0; model = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset value", acc, '0);

    cyc(0, 1, 32'hFFFF_FFFF);
    cyc(0, 1, 32'h0000_0002);
    check("carry out dropped", acc, 32'h1);
    for (int i = 0; i < 300; i++) cyc(0, ($urandom() % 3) != 0, $urandom());
    cyc(1, 1, $urandom());
    check("cleared", acc, '0);

    for (int i = 0; i < 8; i++) w[i] = $urandom();
    for (int i = 0; i < 8; i++) cyc(0, 1, w[i]);
    fwd = acc;
    cyc(1, 0, '0);
    for (int i = 7; i >= 0; i--) cyc(0, 1, w[i]);
    rev = acc;
    check("order independent", fwd, rev);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
