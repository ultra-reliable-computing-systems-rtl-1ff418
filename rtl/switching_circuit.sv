// switching_circuit: self-repairable switching circuit (SC) between two
// GAL modules.
//
// Each of the K input pins p (outputs of the master GAL) feeds two
// DEMUXes: d(2p) for the original lines and d(2p+1) for the extra lines.
// Every DEMUX has K outputs, one line to each output pin: DEMUX d(2p+f)
// output q goes to AND gate a(2q+f). So each AND gate collects K lines,
// one from the DEMUX of the same family of every input pin, and each
// output pin q has two AND gates, a(2q) and a(2q+1), each with its own
// output buffer b(2q), b(2q+1). There are 2K^2 lines in all.
//
// A DEMUX puts its data on the selected line and a 1 on all others (and
// on all lines when disabled), so an AND gate passes exactly the one input
// that selects it. Routing input p to output q uses d(2p) -> a(2q) -> b(2q)
// or, as the spare, d(2p+1) -> a(2q+1) -> b(2q+1).
//
// Test mode: the DEMUX data inputs come from SCR6 (2K bits, bit i feeds
// DEMUX i) and the AND outputs are captured by SCR7 (2K bits, bit a is
// AND a) and shifted out on the diagnosis/repair bus. In normal mode SCR7
// is transparent.
//
// The buffers are tri-state in the design; here the two buffers of an
// output are merged into an enable-gated OR, and an output with no enabled
// buffer reads 0. defect_sa0/defect_sa1[i][q] model a line stuck-at fault
// on the line from DEMUX i to its AND gate of output q; they are 0 in a
// real part. Timing: combinational from pins to pins in normal mode.
module switching_circuit
  import urcs_pkg::*;
#(
  parameter int unsigned K = SC_PINS,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [K-1:0]              pin_in,
  output logic [K-1:0]              pin_out,
  // test access
  input  logic                      test_mode,
  input  logic                      scr6_shift,
  input  logic                      scr6_sin,
  input  logic                      scr7_capture,
  input  logic                      scr7_shift,
  output logic                      scr7_sout,
  // configuration (DEMUX enable/select and buffer enables)
  input  logic [2*K-1:0]            dmx_en,
  input  logic [2*K-1:0][SW-1:0]    dmx_sel,
  input  logic [2*K-1:0]            buf_en,
  // line defect model
  input  logic [2*K-1:0][K-1:0]     defect_sa0,
  input  logic [2*K-1:0][K-1:0]     defect_sa1
);

  logic [2*K-1:0]        scr6_q;
  logic [2*K-1:0]        dmx_data;
  logic [2*K-1:0][K-1:0] line;
  logic [2*K-1:0]        and_out;
  logic [2*K-1:0]        and_buf;

  scan_sipo #(.W(2*K)) u_scr6 (
    .clk, .rst_n,
    .shift   (scr6_shift),
    .sin     (scr6_sin),
    .par_out (scr6_q)
  );

  always_comb begin
    for (int i = 0; i < 2*K; i++) begin
      dmx_data[i] = test_mode ? scr6_q[i] : pin_in[i/2];
      for (int q = 0; q < K; q++) begin
        line[i][q] = (dmx_en[i] && dmx_sel[i] == SW'(q)) ? dmx_data[i] : 1'b1;
        line[i][q] = (line[i][q] | defect_sa1[i][q]) & ~defect_sa0[i][q];
      end
    end
    for (int q = 0; q < K; q++) begin
      for (int f = 0; f < 2; f++) begin
        and_out[2*q+f] = 1'b1;
        for (int p = 0; p < K; p++) begin
          and_out[2*q+f] = and_out[2*q+f] & line[2*p+f][q];
        end
      end
    end
  end

  scan_piso #(.W(2*K)) u_scr7 (
    .clk, .rst_n,
    .test_mode,
    .capture (scr7_capture),
    .shift   (scr7_shift),
    .par_in  (and_out),
    .par_out (and_buf),
    .sout    (scr7_sout)
  );

  always_comb begin
    for (int q = 0; q < K; q++) begin
      pin_out[q] = (buf_en[2*q] & and_buf[2*q]) | (buf_en[2*q+1] & and_buf[2*q+1]);
    end
  end

endmodule
