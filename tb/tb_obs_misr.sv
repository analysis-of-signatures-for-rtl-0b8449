// tb_obs_misr: self-checking test of the MISR / LFSR register.
//
// dut32: the default 32-bit register (x^32+x^25+x^15+x^7+1). Random words are
// absorbed with random gaps in in_valid, and the signature is compared with a
// bit-level model after every clock; seed load, clear and LFSR stepping are
// checked the same way. Order dependence: "a,b,c" and "b,a,c" must give
// different signatures.
// dut4: a 4-bit register with x^4+x+1, a primitive polynomial, run as an LFSR:
// it must visit all 15 non-zero states before repeating.
module tb_obs_misr;
  import tb_obs_model_pkg::*;

  localparam logic [31:0] P32 = 32'h0200_8081;   // x^25 + x^15 + x^7 + 1

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        mode, sload, clr, vld;
  logic [31:0] seed, din, sig;
  logic        mode4, sload4;
  logic [3:0]  seed4, sig4;

  obs_misr dut32 (.clk(clk), .rst_n(rst_n), .lfsr_mode(mode), .seed_load(sload),
                  .seed(seed), .clear(clr), .in_valid(vld), .in_data(din), .signature(sig));
  obs_misr #(.W(4), .POLY(4'b0011)) dut4 (.clk(clk), .rst_n(rst_n), .lfsr_mode(mode4),
                  .seed_load(sload4), .seed(seed4), .clear(1'b0), .in_valid(1'b0),
                  .in_data(4'h0), .signature(sig4));

  logic [31:0] model;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Drive one clock with the given controls, update the model, compare.
  task automatic cyc(logic m, logic sl, logic [31:0] sd, logic c, logic v, logic [31:0] d);
    @(negedge clk);
    mode = m; sload = sl; seed = sd; clr = c; vld = v; din = d;
    if (sl)          model = sd;
    else if (c)      model = '0;
    else if (m)      model = 32'(misr_step(64'(model), 64'(d), 64'(P32), 32, 1'b0));
    else if (v)      model = 32'(misr_step(64'(model), 64'(d), 64'(P32), 32, 1'b1));
    @(negedge clk);
    mode = 0; sload = 0; clr = 0; vld = 0;
    check("signature", 64'(sig), 64'(model));
  endtask

  initial begin
    logic [31:0] a, b, c, sig_abc, sig_bac;
    mode = 0; sload = 0; clr = 0; vld = 0; seed = '0; din = '0;
    mode4 = 0; sload4 = 0; seed4 = '0;
    model = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset value", 64'(sig), 64'd0);

    // Single 1 into stage 0 then step with zero data: feedback must hit the
    // taps of x^25, x^15, x^7 and x^0 (stages 6, 16, 24, 31).
    cyc(0, 0, '0, 0, 1, 32'h0000_0001);
    check("one absorbed", 64'(sig), 64'h1);
    cyc(0, 0, '0, 0, 1, 32'h0);
    check("feedback taps", 64'(sig), 64'h8101_0040);

    // Random MISR traffic with gaps.
    for (int i = 0; i < 300; i++) cyc(0, 0, '0, 0, ($urandom() % 4) != 0, $urandom());

    // Clear, seed load, LFSR stepping (data ignored).
    cyc(0, 0, '0, 1, 1, $urandom());
    check("cleared", 64'(sig), 64'd0);
    cyc(0, 1, 32'hDEAD_BEEF, 1, 1, $urandom());
    check("seeded", 64'(sig), 64'hDEAD_BEEF);
    for (int i = 0; i < 50; i++) cyc(1, 0, '0, 0, $urandom() % 2, $urandom());

    // Order dependence.
    a = $urandom(); b = $urandom(); c = $urandom();
    cyc(0, 0, '0, 1, 0, '0);
    cyc(0, 0, '0, 0, 1, a); cyc(0, 0, '0, 0, 1, b); cyc(0, 0, '0, 0, 1, c);
    sig_abc = sig;
    cyc(0, 0, '0, 1, 0, '0);
    cyc(0, 0, '0, 0, 1, b); cyc(0, 0, '0, 0, 1, a); cyc(0, 0, '0, 0, 1, c);
    sig_bac = sig;
    check("order dependent", 64'(sig_abc != sig_bac), 64'd1);

    // 4-bit LFSR with a primitive polynomial: period 15.
    begin
      bit seen [16];
      int steps = 0;
      @(negedge clk); sload4 = 1; seed4 = 4'h1;
      @(negedge clk); sload4 = 0; mode4 = 1;
      seen[sig4] = 1'b1;
      // sig4 already stepped once at this edge
      do begin
        @(negedge clk);
        steps++;
        if (sig4 == 4'h0) break;
        seen[sig4] = 1'b1;
      end while (sig4 != 4'h1 && steps < 40);
      mode4 = 0;
      begin
        int n = 0;
        for (int s = 1; s < 16; s++) n += seen[s];
        check("4-bit LFSR visits 15 states", 64'(n), 64'd15);
        check("4-bit LFSR never zero", 64'(seen[0]), 64'd0);
      end
    end

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
