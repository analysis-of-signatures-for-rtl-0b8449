// tb_obs_compressor: self-checking test of the rotate-XOR compressor.
//
// Two instances: the 66-bit to 32-bit default (a partial top chunk padded with
// 30 zeros) and a 32-bit to 16-bit one (a width that divides evenly). Both
// get random vectors plus hand-made ones; every output is compared with the
// bit-level model one clock after the input, so the one-cycle latency is
// checked as well. Vectors whose chunks are equal (a plain XOR fold makes
// them all-zero) must fold to a non-zero word.
module tb_obs_compressor;
  import tb_obs_model_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        v66, ov66;
  logic [65:0] d66;
  logic [31:0] o66;
  logic        v32, ov32;
  logic [31:0] d32;
  logic [15:0] o32;

  obs_compressor dut66 (.clk(clk), .rst_n(rst_n), .in_valid(v66), .in_data(d66),
                        .out_valid(ov66), .out_data(o66));
  obs_compressor #(.N(32), .W(16)) dut32 (.clk(clk), .rst_n(rst_n), .in_valid(v32),
                        .in_data(d32), .out_valid(ov32), .out_data(o32));

  function automatic logic [65:0] rnd66();
    return 66'({$urandom(), $urandom(), $urandom()});
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Apply one vector to both instances and check one clock later.
  task automatic apply(logic [65:0] a, logic [31:0] b);
    logic [63:0] e66, e32;
    e66 = fold(vec_t'(a), 66, 32);
    e32 = fold(vec_t'(b), 32, 16);
    @(negedge clk);
    v66 = 1'b1; d66 = a; v32 = 1'b1; d32 = b;
    @(negedge clk);
    v66 = 1'b0; v32 = 1'b0;
    check("valid66", 64'(ov66), 64'd1);
    check("valid32", 64'(ov32), 64'd1);
    check("fold66", 64'(o66), e66);
    check("fold32", 64'(o32), e32);
    @(negedge clk);
    check("valid66 drops", 64'(ov66), 64'd0);
  endtask

  initial begin
    v66 = 0; v32 = 0; d66 = '0; d32 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset valid", 64'(ov66), 64'd0);

    // Hand-made vectors.
    apply(66'h0, 32'h0);
    check("zero in, zero out", 64'(o66), 64'd0);
    apply({2'b00, 32'h6666_6666, 32'h6666_6666}, {16'h6666, 16'h6666});
    check("plain XOR fold would be void", xor_fold(vec_t'({32'h6666_6666, 32'h6666_6666}), 66, 32), 64'd0);
    check("equal chunks fold to non-zero 66", 64'(o66 != 0), 64'd1);
    check("equal chunks fold to non-zero 32", 64'(o32 != 0), 64'd1);
    // Worked values: rotr(0x6666)^0x6666 = 0x3333^0x6666 = 0x5555.
    check("equal chunks value 32", 64'(o32), 64'h5555);
    // The 2-bit top chunk: only bit 64 set -> chunk 2 = 1, rotated twice.
    apply(66'h1_0000_0000_0000_0000, 32'h0001_0000);
    check("top chunk value 66", 64'(o66), 64'h4000_0000);
    check("top chunk value 32", 64'(o32), 64'h8000);
    apply(66'h2_0000_0000_0000_0000, 32'h0000_0001);
    check("top chunk bit1 66", 64'(o66), 64'h8000_0000);
    check("bottom chunk 32", 64'(o32), 64'h0001);

    // Random vectors, back to back.
    for (int i = 0; i < 200; i++) begin
      apply(rnd66(), $urandom());
    end

    // Streaming: a new vector every clock.
    begin
      logic [65:0] a [16];
      logic [31:0] b [16];
      for (int i = 0; i < 16; i++) begin a[i] = rnd66(); b[i] = $urandom(); end
      @(negedge clk);
      for (int i = 0; i <= 16; i++) begin
        if (i < 16) begin v66 = 1; d66 = a[i]; v32 = 1; d32 = b[i]; end
        else begin v66 = 0; v32 = 0; end
        @(negedge clk);
        if (i < 16) begin
          check("stream fold66", 64'(o66), fold(vec_t'(a[i]), 66, 32));
          check("stream fold32", 64'(o32), fold(vec_t'(b[i]), 32, 16));
        end
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
