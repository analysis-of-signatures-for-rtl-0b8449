// tb_obs_workloads: the compression-ratio study configurations.
//
// Ten observation IPs run side by side: 16-bit and 32-bit signatures
// (x^16+x^5+x^3+x^2+1 and x^32+x^25+x^15+x^7+1) at compression ratios of
// 2x, 4x, 16x, 32x and 64x, that is bus widths N = W * ratio from 32 to 2048
// bits. Each gets VECS vectors counting up from zero ("in sequence") and then,
// after a clear, VECS random vectors. Every compressed word and both
// signatures are compared with the reference model on every clock. For each
// run the testbench reports how often the most frequent running MISR
// signature occurred and how many non-zero vectors compressed to an all-zero
// (void) word. Any linear fold of N bits into W bits maps 2^(N-W)-1 non-zero
// vectors to zero, so void words are counted, not forbidden; what is required
// is that a vector of two equal non-zero chunks, the case a plain XOR fold
// turns into zero (every 64th random vector is made so), never compresses to
// zero; the all-ones chunk, the one exception, is avoided.
module tb_obs_workloads;
  import tb_obs_model_pkg::*;

  localparam int VECS = 1 << 19;
  localparam int NCFG = 10;
  localparam int RATIO [5] = '{2, 4, 16, 32, 64};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int done = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int W = (g < 5) ? 32 : 16;
    localparam int R = RATIO[g % 5];
    localparam int N = W * R;
    localparam logic [W-1:0] P = (W == 32) ? W'(obs_pkg::POLY32) : W'(obs_pkg::POLY16);

    logic         in_valid, clear;
    logic [N-1:0] in_data;
    logic         comp_valid;
    logic [W-1:0] comp_data, misr_sig, acc_sig;

    observation_ip #(.N(N), .W(W), .POLY(P)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
      .lfsr_mode(1'b0), .seed_load(1'b0), .seed('0), .clear(clear),
      .comp_valid(comp_valid), .comp_data(comp_data),
      .misr_signature(misr_sig), .accum_signature(acc_sig));

    initial begin
      logic [W-1:0] m_misr, m_acc, p_data, f;
      logic         p_valid;
      vec_t         v;
      in_valid = 0; clear = 0; in_data = '0;
      @(posedge rst_n);
      for (int mode = 0; mode < 2; mode++) begin
        automatic int count [logic [W-1:0]];
        automatic int max_rep = 0;
        automatic int voids = 0;
        automatic int eq_voids = 0;
        // clear both signatures
        @(negedge clk);
        clear = 1; in_valid = 0;
        @(negedge clk);
        clear = 0;
        m_misr = '0; m_acc = '0; p_valid = 0; p_data = '0;
        for (int i = 0; i <= VECS; i++) begin
          @(negedge clk);
          if (i < VECS) begin
            v = '0;
            if (mode == 0) v[31:0] = i;
            else for (int b = 0; b < N; b += 32) v[b +: 32] = $urandom();
            for (int b = N; b < 2048; b++) v[b] = 1'b0;
            in_valid = 1; in_data = N'(v);
            f = W'(fold(v, N, W));
            if (v != 0 && f == 0) voids++;
            // two equal chunks must not fold to zero
            if (mode == 1 && i % 64 == 0) begin
              for (int b = W; b < N; b++) v[b] = 1'b0;
              if (&v[W-1:0]) v[0] = 1'b0;   // all ones is rotation invariant
              v[2*W-1:W] = v[W-1:0];
              if (v[W-1:0] != 0 && fold(v, N, W) == 0) eq_voids++;
              in_data = N'(v);
              f = W'(fold(v, N, W));
            end
          end else begin
            in_valid = 0;
          end
          if (p_valid) begin
            m_misr = W'(misr_step(64'(m_misr), 64'(p_data), 64'(P), W, 1'b1));
            m_acc  = m_acc + p_data;
            count[m_misr]++;
            if (count[m_misr] > max_rep) max_rep = count[m_misr];
          end
          p_valid = (i < VECS);
          p_data  = f;
          @(posedge clk);
          #1;
          if (i < VECS) check("comp_data", 64'(comp_data), 64'(f));
          check("misr", 64'(misr_sig), 64'(m_misr));
          check("accum", 64'(acc_sig), 64'(m_acc));
        end
        // one idle clock: the signatures must hold
        @(negedge clk);
        in_valid = 0;
        @(posedge clk);
        #1;
        check("final misr", 64'(misr_sig), 64'(m_misr));
        check("final accum", 64'(acc_sig), 64'(m_acc));
        check("no void word from equal chunks", 64'(eq_voids), 64'd0);
        $display("W=%0d ratio=%0dx N=%0d %s: vectors=%0d distinct signatures=%0d most repeated=%0d void words=%0d",
                 W, R, N, mode == 0 ? "sequence" : "random  ", VECS, count.num(), max_rep, voids);
      end
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * VECS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
