// tb_observation_ip: end-to-end test of the observation IP at its default
// parameters (66-bit bus, 32-bit signatures, x^32+x^25+x^15+x^7+1).
//
// A stream of bus words, with idle gaps, runs through the IP while a model
// (bit-level compressor fold, MISR step and modulo-2^32 sum) tracks both
// signatures; after every clock the compressed word and both signatures are
// compared with the model, and the two-clock latency from bus to signature is
// checked. The test makes every mechanism of the design happen and counts it:
//   pad       bus words with a non-zero partial (2-bit) top chunk
//   void      words whose 32-bit chunks are equal, which a plain XOR fold
//             would turn into an all-zero word; here they must not
//   gap       idle clocks in the stream (signatures must hold)
//   misr      words absorbed in MISR mode
//   lfsr      clocks stepped in LFSR mode
//   seed      seed loads
//   clear     clears
//   order     a reordered run: MISR must differ, the sum must not
// A mechanism that never happened counts as a failure.
module tb_observation_ip;
  import tb_obs_model_pkg::*;

  localparam logic [31:0] P32 = 32'h0200_8081;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_pad = 0, n_void = 0, n_gap = 0, n_misr = 0, n_lfsr = 0;
  int n_seed = 0, n_clear = 0, n_order = 0;

  logic        in_valid, lfsr_mode, seed_load, clear;
  logic [65:0] in_data;
  logic [31:0] seed;
  logic        comp_valid;
  logic [31:0] comp_data, misr_sig, acc_sig;

  observation_ip dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_data(in_data),
    .lfsr_mode(lfsr_mode), .seed_load(seed_load), .seed(seed), .clear(clear),
    .comp_valid(comp_valid), .comp_data(comp_data),
    .misr_signature(misr_sig), .accum_signature(acc_sig)
  );

  // Model state. The compressed word of the previous clock is pending.
  logic        p_valid;
  logic [31:0] p_data;
  logic [31:0] m_misr, m_acc;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One clock: drive the inputs at the falling edge, advance the model, and
  // compare just after the next rising edge. Inputs stay driven until the
  // next call.
  task automatic cyc(logic v, logic [65:0] d, logic lm, logic sl, logic [31:0] sd, logic c);
    logic [31:0] f;
    @(negedge clk);
    in_valid = v; in_data = d; lfsr_mode = lm; seed_load = sl; seed = sd; clear = c;
    // collectors act on the word compressed in the previous clock
    if (sl)          begin m_misr = sd; n_seed++; end
    else if (c)      m_misr = '0;
    else if (lm)     begin m_misr = 32'(misr_step(64'(m_misr), 64'(p_data), 64'(P32), 32, 1'b0)); n_lfsr++; end
    else if (p_valid) begin m_misr = 32'(misr_step(64'(m_misr), 64'(p_data), 64'(P32), 32, 1'b1)); n_misr++; end
    if (c)            begin m_acc = '0; n_clear++; end
    else if (p_valid) m_acc = m_acc + p_data;
    f = 32'(fold(vec_t'(d), 66, 32));
    if (v) begin
      if (d[65:64] != 0) n_pad++;
      if (d[63:32] == d[31:0] && d[65:64] == 0 && d[31:0] != 0) begin
        n_void++;
        check("equal chunks: plain fold void", 32'(xor_fold(vec_t'(d), 66, 32)), '0);
        check("equal chunks: compressed non-zero", 32'(f != 0), 32'd1);
      end
    end else n_gap++;
    if (v) p_data = f;
    p_valid = v;
    @(posedge clk);
    #1;
    check("comp_valid", 32'(comp_valid), 32'(v));
    if (v) check("comp_data", comp_data, f);
    check("misr signature", misr_sig, m_misr);
    check("accum signature", acc_sig, m_acc);
  endtask

  // Bus word generator: random, or with equal halves, or with a top chunk.
  function automatic logic [65:0] word(int kind);
    logic [31:0] h = $urandom();
    case (kind)
      0: return {2'b00, h, h};
      1: return {2'($urandom()), 32'($urandom()), 32'($urandom())};
      default: return {2'b00, 32'($urandom()), 32'($urandom())};
    endcase
  endfunction

  // Let the pipeline empty into the collectors (idle clock, MISR mode).
  task automatic drain();
    cyc(0, '0, 0, 0, '0, 0);
  endtask

  initial begin
    logic [65:0] a, b, c;
    logic [31:0] misr_abc, acc_abc;
    in_valid = 0; in_data = '0; lfsr_mode = 0; seed_load = 0; seed = '0; clear = 0;
    p_valid = 0; p_data = '0; m_misr = '0; m_acc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset misr", misr_sig, '0);
    check("reset accum", acc_sig, '0);

    // Latency: one word after a clear arrives in the signatures two clocks later.
    cyc(0, '0, 0, 0, '0, 1);
    @(negedge clk);
    clear = 0; in_valid = 1; in_data = {2'b01, 64'h0};
    @(negedge clk);
    in_valid = 0;
    check("latency: not yet absorbed", acc_sig, '0);
    @(negedge clk);
    check("latency: absorbed after 2 clocks", acc_sig, 32'h4000_0000);
    m_acc = 32'h4000_0000;
    m_misr = 32'(misr_step(64'h0, 64'h4000_0000, 64'(P32), 32, 1'b1));
    check("latency: misr absorbed", misr_sig, m_misr);
    p_valid = 0;

    // Mixed traffic.
    for (int i = 0; i < 400; i++) begin
      automatic int r = $urandom() % 10;
      cyc(1'(r != 0), word($urandom() % 3), 0, 0, '0, 0);
    end
    drain();

    // LFSR run from a seed, then back to MISR mode.
    cyc(0, '0, 0, 1, 32'h1234_5678, 0);
    for (int i = 0; i < 40; i++) cyc(1'($urandom() % 2), word(1), 1, 0, '0, 0);
    drain();
    for (int i = 0; i < 40; i++) cyc(1, word($urandom() % 3), 0, 0, '0, 0);
    drain();

    // Order: a,b,c against b,a,c.
    a = word(1); b = word(1); c = word(1);
    cyc(0, '0, 0, 0, '0, 1);
    cyc(1, a, 0, 0, '0, 0); cyc(1, b, 0, 0, '0, 0); cyc(1, c, 0, 0, '0, 0); drain();
    misr_abc = misr_sig; acc_abc = acc_sig;
    cyc(0, '0, 0, 0, '0, 1);
    cyc(1, b, 0, 0, '0, 0); cyc(1, a, 0, 0, '0, 0); cyc(1, c, 0, 0, '0, 0); drain();
    check("order: MISR differs", 32'(misr_sig != misr_abc), 32'd1);
    check("order: sum equal", acc_sig, acc_abc);
    n_order++;

    $display("mechanisms: pad=%0d void=%0d gap=%0d misr=%0d lfsr=%0d seed=%0d clear=%0d order=%0d",
             n_pad, n_void, n_gap, n_misr, n_lfsr, n_seed, n_clear, n_order);
    if (n_pad == 0)   begin failures++; $display("FAIL no padded word"); end
    if (n_void == 0)  begin failures++; $display("FAIL no equal-chunk word"); end
    if (n_gap == 0)   begin failures++; $display("FAIL no gap"); end
    if (n_misr == 0)  begin failures++; $display("FAIL no MISR step"); end
    if (n_lfsr == 0)  begin failures++; $display("FAIL no LFSR step"); end
    if (n_seed == 0)  begin failures++; $display("FAIL no seed load"); end
    if (n_clear == 0) begin failures++; $display("FAIL no clear"); end
    if (n_order == 0) begin failures++; $display("FAIL no reorder"); end
    checks += 8;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
