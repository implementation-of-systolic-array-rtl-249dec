// tb_svm_agent: drives one SVM classifier and checks every result it gives.
//
// The agent runs two phases. In each it loads NUM_SV random support vectors
// (random Q5.8 elements, alpha in Q8.8, label +1 or -1, class; phase 0 puts
// the support vectors of each class next to each other, N_CLS0 of class 0,
// N_CLS1 of class 1 and the rest of class 2, phase 1 scatters them) and a random bias per class, then streams N_VEC test vectors, mostly
// back to back with an idle cycle now and then, and waits until the pipeline
// is empty. Phase 0 starts with the six example values 4.2, 4.5, 5, 5.5, 6
// and 3. For every test vector the expected class scores
//   score_c = b_c + sum over SVs of class c of alpha*y*K(x, sv)
// and the winning class are computed here with plain 64-bit arithmetic and
// compared with the classifier output, which must arrive exactly NUM_SV + 2
// cycles after the test vector was accepted. When POLY is set the kernel is
// (1 + x.sv)^4 and all elements are kept below 8 in magnitude.
// Mechanism counters (negative CSD digits in the input, label -1 support
// vectors, back-to-back and idle cycles, classes that won, reloads) are
// reported to the enclosing testbench.
module tb_svm_agent
  import svm_pkg::*;
  import tb_svm_ref_pkg::*;
#(
  parameter int unsigned NUM_SV      = 8,
  parameter int unsigned NUM_CLASSES = 2,
  parameter bit          POLY        = 1'b0,
  parameter int unsigned N_VEC       = 200,
  parameter int unsigned N_CLS0      = 0,  // phase-0 SVs of class 0 (0: even split)
  parameter int unsigned N_CLS1      = 0,  // phase-0 SVs of class 1 (rest: class 2)
  localparam int unsigned CLS_W      = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  localparam int unsigned ADDR_W     = (NUM_SV > 1) ? $clog2(NUM_SV) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              cfg_we,
  output logic [ADDR_W-1:0] cfg_addr,
  output data_t             cfg_sv    [DIM],
  output alpha_t            cfg_alpha,
  output logic              cfg_neg,
  output logic [CLS_W-1:0]  cfg_class,
  output logic              bias_we,
  output logic [CLS_W-1:0]  bias_class,
  output acc_t              bias_val,
  output logic              in_valid,
  output data_t             in_x      [DIM],
  input  logic              out_valid,
  input  logic [CLS_W-1:0]  out_class,
  input  acc_t              out_score [NUM_CLASSES],
  output logic              done,
  output int                checks,
  output int                failures,
  output int                n_negdigit,
  output int                n_neglabel,
  output int                n_b2b,
  output int                n_idle,
  output int                n_reload,
  output int                n_results,
  output logic [NUM_CLASSES-1:0] won
);

  typedef struct packed {
    logic [NUM_CLASSES-1:0][63:0] score;
    int                           cls;
    longint                       cycle;
  } exp_t;

  longint sv_r [NUM_SV][2];
  longint al_r [NUM_SV];
  bit     ng_r [NUM_SV];
  int     cl_r [NUM_SV];
  longint b_r  [NUM_CLASSES];

  exp_t   q [$];
  longint cycle = 0;
  logic   prev_valid = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint rnd_elem();
    longint v = longint'($signed(13'($urandom)));
    return POLY ? (v >>> 1) : v;
  endfunction

  function automatic exp_t expect_for(longint x0, longint x1);
    exp_t e;
    longint sc [NUM_CLASSES];
    for (int c = 0; c < int'(NUM_CLASSES); c++) sc[c] = b_r[c];
    for (int i = 0; i < int'(NUM_SV); i++)
      sc[cl_r[i]] += term(al_r[i], ng_r[i], kernel(x0, x1, sv_r[i][0], sv_r[i][1], POLY, 4));
    e.cls = 0;
    for (int c = 1; c < int'(NUM_CLASSES); c++) if (sc[c] > sc[e.cls]) e.cls = c;
    for (int c = 0; c < int'(NUM_CLASSES); c++) e.score[c] = sc[c];
    e.cycle = 0;
    return e;
  endfunction

  // Checker: every result against the oldest outstanding expectation.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_results++;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = q.pop_front();
        if (cycle - e.cycle != longint'(NUM_SV + 2)) begin
          failures++;
          $display("FAIL latency %0d expected %0d", cycle - e.cycle, NUM_SV + 2);
        end
        checks++;
        if (out_class !== CLS_W'(e.cls)) begin
          failures++;
          if (failures < 10) $display("FAIL class %0d expected %0d", out_class, e.cls);
        end
        for (int c = 0; c < int'(NUM_CLASSES); c++) begin
          checks++;
          if (out_score[c] !== e.score[c]) begin
            failures++;
            if (failures < 10) $display("FAIL score[%0d] %0d expected %0d", c, out_score[c], e.score[c]);
          end
        end
        won[out_class] <= 1'b1;
      end
    end
  end

  // Input side: count back-to-back and idle cycles, queue expectations.
  always @(posedge clk) begin
    if (rst_n) begin
      prev_valid <= in_valid;
      if (in_valid && prev_valid) n_b2b++;
      if (!in_valid && prev_valid) n_idle++;
    end
  end

  task automatic load_params(input int phase);
    for (int i = 0; i < int'(NUM_SV); i++) begin
      sv_r[i][0] = rnd_elem();
      sv_r[i][1] = rnd_elem();
      al_r[i]    = longint'($urandom_range(0, 32767));
      ng_r[i]    = 1'($urandom);
      if (phase != 0)         cl_r[i] = $urandom_range(0, NUM_CLASSES - 1);
      else if (N_CLS0 == 0)   cl_r[i] = (i * int'(NUM_CLASSES)) / int'(NUM_SV);
      else if (i < int'(N_CLS0)) cl_r[i] = 0;
      else if (NUM_CLASSES < 3 || i < int'(N_CLS0 + N_CLS1)) cl_r[i] = 1;
      else                    cl_r[i] = 2;
      if (ng_r[i]) n_neglabel++;
      @(negedge clk);
      cfg_we    = 1'b1;
      cfg_addr  = ADDR_W'(i);
      cfg_sv[0] = 13'(sv_r[i][0]);
      cfg_sv[1] = 13'(sv_r[i][1]);
      cfg_alpha = 16'(al_r[i]);
      cfg_neg   = ng_r[i];
      cfg_class = CLS_W'(cl_r[i]);
    end
    for (int c = 0; c < int'(NUM_CLASSES); c++) begin
      b_r[c] = longint'($signed($urandom)) >>> 12;
      @(negedge clk);
      cfg_we     = 1'b0;
      bias_we    = 1'b1;
      bias_class = CLS_W'(c);
      bias_val   = b_r[c];
    end
    @(negedge clk);
    bias_we = 1'b0;
  endtask

  initial begin
    real ex [6] = '{4.2, 4.5, 5.0, 5.5, 6.0, 3.0};
    longint x0, x1;
    logic [63:0] rs, rm;
    done = 1'b0;
    checks = 0; failures = 0; n_negdigit = 0; n_neglabel = 0;
    n_b2b = 0; n_idle = 0; n_reload = 0; n_results = 0; won = '0;
    cfg_we = 1'b0; cfg_addr = '0; cfg_sv = '{default: '0}; cfg_alpha = '0;
    cfg_neg = 1'b0; cfg_class = '0; bias_we = 1'b0; bias_class = '0; bias_val = '0;
    in_valid = 1'b0; in_x = '{default: '0};
    @(posedge rst_n);
    for (int phase = 0; phase < 2; phase++) begin
      if (phase > 0) n_reload++;
      load_params(phase);
      for (int n = 0; n < int'(N_VEC); n++) begin
        if (phase == 0 && n < 6) begin
          x0 = longint'($rtoi(ex[n] * 256.0));
          x1 = longint'($rtoi(ex[5 - n] * 256.0));
          if (POLY) begin x0 = x0 >>> 1; x1 = x1 >>> 1; end
        end else begin
          x0 = rnd_elem();
          x1 = rnd_elem();
        end
        naf(x0, 13, rs, rm);
        if ((rs[12:0] & rm[12:0]) != 0) n_negdigit++;
        @(negedge clk);
        if (n % 9 == 8) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_x[0]  = 13'(x0);
        in_x[1]  = 13'(x1);
        begin
          exp_t e;
          e = expect_for(x0, x1);
          e.cycle = cycle;  // cycle in which the vector is presented
          q.push_back(e);
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (NUM_SV + 4) @(negedge clk);
      checks++;
      if (q.size() != 0) begin
        failures++;
        $display("FAIL %0d results missing", q.size());
      end
    end
    done = 1'b1;
  end

endmodule
