// pli_unit: PLI calculation system. Turns one window of N-channel EEG into
// the C(N,2) PLI values of the functional connectivity matrix.
//
// Phase generation: the channels arrive one after the other, L samples each
// (channel-major). analytic_signal forms each channel's analytic signal,
// phase_calc turns it into instantaneous phases, and the phases are written
// to a phase memory with one L-word bank per channel.
// PLI generation: when all N*L phases are stored, a sequencer takes each
// reference channel i = 0..N-2 in turn. For L clocks it loads channel i into
// the FIFO of pli_calc; for the next L clocks it reads sample l of every
// channel i+1..N-1 at once (registered reads) and feeds them to the N-1
// lanes of pli_calc, which compare all of them with the reference in one
// pass. The N-1-i results of the pass then leave one per clock on the matrix
// write port as pairs (i, i+1) .. (i, N-1), while the next reference loads.
// Interface: eeg valid/ready input; m_we/m_wi/m_wj/m_wdata write port;
// `done` pulses the clock after the last pair is written; `busy` is high
// from the first sample until then.
// Timing (L = 128, N = 19): phases of one channel take 2L + L*log2(L) =
// 1152 clocks, overlapping the input of the next channel; the PLI values
// take (N-1)*2L = 4608 clocks plus a few of pipeline and writing. From the
// last input sample to `done` is 5,657 clocks.
// The chain analytic signal -> phase calculation -> PLI calculation and the
// FIFO reuse of the reference channel follow the document. The
// channel-major input order, the banked phase memory and the lanes that
// share one reference FIFO are this design's choices. The wrap flag of
// pli_calc is not used here; it stays visible for observation in simulation.
module pli_unit #(
  parameter int N     = fc_pkg::N_CH,
  parameter int L     = fc_pkg::WIN_L,
  parameter int IN_W  = fc_pkg::EEG_W,
  parameter int DW    = 24,
  parameter int PH_W  = fc_pkg::PH_W,
  parameter int W     = fc_pkg::W_W,
  parameter int ITER  = 16,
  parameter int NUM   = 16,
  parameter int NB    = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   eeg_valid,
  output logic                   eeg_ready,
  input  logic signed [IN_W-1:0] eeg_data,
  output logic                   m_we,
  output logic [NB-1:0]          m_wi,
  output logic [NB-1:0]          m_wj,
  output logic [W-1:0]           m_wdata,
  output logic                   busy,
  output logic                   done
);
  localparam int LB = $clog2(L);
  localparam int AB = $clog2(N * L);

  // ---------------- phase generation ----------------
  logic [AB:0] in_cnt, wr_cnt;
  logic        as_in_ready, as_out_valid, pc_in_ready, pc_out_valid;
  logic signed [DW-1:0]   as_re, as_im;
  logic signed [PH_W-1:0] pc_phase;
  logic        pli_phase;              // all phases stored, PLI sequencing

  assign eeg_ready = as_in_ready && (in_cnt < (AB+1)'(N * L));

  analytic_signal #(.L(L), .IN_W(IN_W), .DW(DW)) u_as (
    .clk, .rst, .in_valid(eeg_valid && eeg_ready), .in_ready(as_in_ready),
    .in_data(eeg_data), .out_valid(as_out_valid), .out_ready(pc_in_ready),
    .out_re(as_re), .out_im(as_im));

  phase_calc #(.XW(DW), .PH_W(PH_W), .ITER(ITER), .NUM(NUM)) u_pc (
    .clk, .rst, .in_valid(as_out_valid), .in_ready(pc_in_ready),
    .in_x(as_re), .in_y(as_im), .out_valid(pc_out_valid), .out_phase(pc_phase));

  // phase memory: one bank of L words per channel, so that every channel's
  // phase of one sample can be read in the same clock
  logic signed [PH_W-1:0] phase_mem [N][L];
  logic [NB-1:0]          wr_ch;
  logic [LB-1:0]          wr_s;

  always_ff @(posedge clk)
    if (pc_out_valid) phase_mem[wr_ch][wr_s] <= pc_phase;

  // ---------------- PLI sequencer ----------------
  // For each reference channel si: L clocks loading it into the FIFO, then
  // L clocks streaming channels si+1..N-1 through the lanes together.
  logic [NB-1:0] si;             // reference channel
  logic [LB-1:0] sl;             // sample
  logic          s_load;         // loading the reference channel
  logic          s_run;
  logic          rd_load, rd_calc;
  logic signed [PH_W-1:0] rd_ref;
  logic signed [PH_W-1:0] rd_lane [N-1];

  // registered reads: the unit sees them one clock after the address
  always_ff @(posedge clk) begin
    rd_ref <= phase_mem[si][sl];
    for (int m = 0; m < N - 1; m++)
      rd_lane[m] <= (int'(si) + 1 + m < N) ? phase_mem[int'(si) + 1 + m][sl] : '0;
  end

  logic             pc_valid, wrap;
  logic [W-1:0]     pc_pli [N-1];

  pli_calc #(.L(L), .LANES(N - 1), .PH_W(PH_W), .W(W)) u_pli (
    .clk, .rst, .load(rd_load), .calc(rd_calc), .ref_in(rd_ref),
    .lane_in(rd_lane), .out_valid(pc_valid), .out_pli(pc_pli), .wrap(wrap));

  // result writer: after each pass the N-1-i values of reference i leave
  // one per clock as pairs (i, i+1), (i, i+2), ..., (i, N-1)
  logic [NB-1:0] oi, om;         // reference of the pass, lane being written
  logic          o_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt <= '0; wr_cnt <= '0; wr_ch <= '0; wr_s <= '0;
      pli_phase <= 1'b0; busy <= 1'b0; done <= 1'b0;
      si <= '0; sl <= '0; s_load <= 1'b1; s_run <= 1'b0;
      rd_load <= 1'b0; rd_calc <= 1'b0; oi <= '0; om <= '0; o_busy <= 1'b0;
    end else begin
      done <= 1'b0;
      if (eeg_valid && eeg_ready) begin
        in_cnt <= in_cnt + 1'b1;
        busy   <= 1'b1;
      end
      if (pc_out_valid) begin
        wr_cnt <= wr_cnt + 1'b1;
        wr_s   <= wr_s + 1'b1;
        if (wr_s == LB'(L - 1)) wr_ch <= wr_ch + 1'b1;
      end
      if (!pli_phase && wr_cnt == (AB+1)'(N * L)) begin
        pli_phase <= 1'b1;
        s_run <= 1'b1; si <= '0; sl <= '0; s_load <= 1'b1;
      end
      rd_load <= s_run && s_load;
      rd_calc <= s_run && !s_load;
      if (s_run) begin
        sl <= sl + 1'b1;
        if (sl == LB'(L - 1)) begin
          if (s_load) begin
            s_load <= 1'b0;
          end else if (si != NB'(N - 2)) begin
            si <= si + 1'b1; s_load <= 1'b1;
          end else begin
            s_run <= 1'b0;
          end
        end
      end
      if (pc_valid) begin
        o_busy <= 1'b1; om <= '0;
      end else if (o_busy) begin
        om <= om + 1'b1;
        if (int'(oi) + 1 + int'(om) == N - 1) begin
          o_busy <= 1'b0;
          if (oi != NB'(N - 2)) begin
            oi <= oi + 1'b1;
          end else begin
            oi <= '0;
            done <= 1'b1; busy <= 1'b0; pli_phase <= 1'b0;
            in_cnt <= '0; wr_cnt <= '0; wr_ch <= '0; wr_s <= '0;
          end
        end
      end
    end
  end

  assign m_we    = o_busy;
  assign m_wi    = oi;
  assign m_wj    = NB'(int'(oi) + 1 + int'(om));
  assign m_wdata = pc_pli[om];
endmodule
