// tb_switching_circuit: self-checking testbench for the 8 x 8 switching
// circuit datapath.
//
// Normal mode: random permutations are routed, each output through its
// original line (DEMUX 2p -> AND 2q) or its extra line (DEMUX 2p+1 ->
// AND 2q+1), and the outputs are compared with the routed inputs. Test
// mode: random SCR6 patterns with random DEMUX selects and random line
// defects are applied and the captured AND outputs, scanned out of SCR7,
// are compared with a reference AND of the line values.
module tb_switching_circuit;
  import urcs_pkg::*;
  localparam int unsigned K = SC_PINS, SW = $clog2(K);

  logic clk = 1'b0, rst_n;
  logic [K-1:0] pin_in, pin_out;
  logic test_mode, scr6_shift, scr6_sin, scr7_capture, scr7_shift, scr7_sout;
  logic [2*K-1:0] dmx_en, buf_en, scr6, got, exp_and;
  logic [2*K-1:0][SW-1:0] dmx_sel;
  logic [2*K-1:0][K-1:0] d_sa0, d_sa1;
  int perm[K];
  bit use_extra[K];
  int checks = 0, failures = 0;

  switching_circuit #(.K(K)) dut (
    .clk, .rst_n, .pin_in, .pin_out, .test_mode, .scr6_shift, .scr6_sin,
    .scr7_capture, .scr7_shift, .scr7_sout, .dmx_en, .dmx_sel, .buf_en,
    .defect_sa0(d_sa0), .defect_sa1(d_sa1)
  );

  always #5 clk = ~clk;
  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pin_in = '0; test_mode = 1'b0; scr6_shift = 1'b0; scr6_sin = 1'b0;
    scr7_capture = 1'b0; scr7_shift = 1'b0; dmx_en = '0; dmx_sel = '0; buf_en = '0;
    d_sa0 = '0; d_sa1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // ---- normal-mode routing ----
    for (int t = 0; t < 50; t++) begin
      for (int q = 0; q < K; q++) perm[q] = q;
      perm.shuffle();
      dmx_en = '0; dmx_sel = '0; buf_en = '0;
      for (int q = 0; q < K; q++) begin
        int i;
        use_extra[q] = 1'($urandom);
        i = 2 * perm[q] + int'(use_extra[q]);
        dmx_en[i] = 1'b1;
        dmx_sel[i] = SW'(q);
        buf_en[2*q + int'(use_extra[q])] = 1'b1;
      end
      for (int v = 0; v < 8; v++) begin
        pin_in = K'($urandom);
        #1;
        for (int q = 0; q < K; q++) begin
          checks++;
          if (pin_out[q] !== pin_in[perm[q]]) begin
            failures++;
            $display("FAIL route out %0d from %0d extra %0d", q, perm[q], use_extra[q]);
          end
        end
      end
    end
    // ---- test mode: scan in, capture, scan out ----
    @(negedge clk);
    test_mode = 1'b1;
    dmx_en = '1;
    for (int t = 0; t < 60; t++) begin
      d_sa0 = '0; d_sa1 = '0;
      if (t % 2 == 1) begin
        d_sa0[$urandom_range(0, 2*K-1)][$urandom_range(0, K-1)] = 1'b1;
        d_sa1[$urandom_range(0, 2*K-1)][$urandom_range(0, K-1)] = 1'b1;
      end
      for (int i = 0; i < 2*K; i++) dmx_sel[i] = SW'($urandom_range(0, K-1));
      scr6 = 16'($urandom);
      pin_in = K'($urandom);  // ignored in test mode
      scr6_shift = 1'b1;
      for (int i = 2*K-1; i >= 0; i--) begin
        scr6_sin = scr6[i];
        @(negedge clk);
      end
      scr6_shift = 1'b0;
      for (int a = 0; a < 2*K; a++) begin
        int q, f;
        q = a / 2; f = a % 2;
        exp_and[a] = 1'b1;
        for (int p = 0; p < K; p++) begin
          int i;
          logic l;
          i = 2*p + f;
          l = (dmx_sel[i] == SW'(q)) ? scr6[i] : 1'b1;
          l = (l | d_sa1[i][q]) & ~d_sa0[i][q];
          exp_and[a] &= l;
        end
      end
      scr7_capture = 1'b1;
      @(negedge clk);
      scr7_capture = 1'b0;
      scr7_shift = 1'b1;
      for (int a = 0; a < 2*K; a++) begin
        got[a] = scr7_sout;
        @(negedge clk);
      end
      scr7_shift = 1'b0;
      checks++;
      if (got !== exp_and) begin failures++; $display("FAIL scan t=%0d got %h exp %h", t, got, exp_and); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
