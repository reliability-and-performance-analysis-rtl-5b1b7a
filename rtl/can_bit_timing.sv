// can_bit_timing: bit time generation, synchronisation and triple sampling.
//
// A nominal bit is NTQ = 1 + PROP_SEG + PHASE_SEG1 + PHASE_SEG2 time quanta
// (sync, propagation, phase 1 and phase 2 segments, as in CAN). One time
// quantum is BRP clock cycles, with BRP = CLK_HZ / (BITRATE * NTQ); the
// defaults give 250 kbit/s from a 16 MHz clock (64 cycles per bit).
// The bus level is sampled at the end of each of the last three quanta of
// phase segment 1, and a 2-of-3 majority of these samples is the bit value
// (two dominant samples out of three make a dominant bit).
//
// Synchronisation: a recessive-to-dominant edge seen while `hard_sync_en`
// is high restarts the bit (hard sync). Otherwise one edge per bit may
// resynchronise: an edge inside prop/phase 1 lengthens phase 1 by up to SJW
// quanta, an edge inside phase 2 shortens phase 2 by up to SJW quanta.
// Edges are ignored while the node itself drives a dominant bit.
//
// Interface timing: `sample_o` is a one-cycle pulse with the voted bit on
// `bit_o`; `tx_point_o` is a one-cycle pulse at the start of each bit
// (start of sync segment), when the transmitter must update its output.
// The bit rate and the three voted samples follow the design's
// specification; the clock frequency, segment lengths and SJW are this
// implementation's choice.
module can_bit_timing #(
  parameter int unsigned CLK_HZ     = 16_000_000,
  parameter int unsigned BITRATE    = 250_000,
  parameter int unsigned PROP_SEG   = 5,
  parameter int unsigned PHASE_SEG1 = 5,
  parameter int unsigned PHASE_SEG2 = 5,
  parameter int unsigned SJW        = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx_i,          // bus level from the transceiver, asynchronous
  input  logic hard_sync_en,  // bus idle: a falling edge starts a new bit
  input  logic tx_dominant,   // this node drives a dominant bit now
  output logic sample_o,      // pulse: bit_o is valid
  output logic bit_o,         // majority of three samples
  output logic tx_point_o     // pulse: start of a new bit
);

  localparam int unsigned NTQ    = 1 + PROP_SEG + PHASE_SEG1 + PHASE_SEG2;
  localparam int unsigned BRP    = CLK_HZ / (BITRATE * NTQ);
  localparam int unsigned SP_IDX = PROP_SEG + PHASE_SEG1;   // last quantum of phase 1
  localparam int unsigned PW     = (BRP > 1) ? $clog2(BRP) : 1;
  localparam int unsigned TW     = $clog2(NTQ);

  initial begin
    assert (BRP >= 1) else $error("CLK_HZ too low for BITRATE");
    assert (SP_IDX >= 3) else $error("phase 1 + prop must hold three samples");
  end

  logic          rx_s1, rx_s2, rx_prev;
  logic [PW-1:0] presc;
  logic [TW-1:0] tq_idx;
  logic [1:0]    smp;          // first two of the three samples
  logic          resynced;     // one resynchronisation per bit
  logic          tq_tick, fall;

  assign tq_tick = (presc == PW'(BRP - 1));
  assign fall    = rx_prev & ~rx_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1      <= 1'b1;
      rx_s2      <= 1'b1;
      rx_prev    <= 1'b1;
      presc      <= '0;
      tq_idx     <= '0;
      smp        <= 2'b11;
      resynced   <= 1'b0;
      sample_o   <= 1'b0;
      bit_o      <= 1'b1;
      tx_point_o <= 1'b0;
    end else begin
      rx_s1      <= rx_i;
      rx_s2      <= rx_s1;
      rx_prev    <= rx_s2;
      sample_o   <= 1'b0;
      tx_point_o <= 1'b0;

      if (fall && hard_sync_en) begin
        // hard synchronisation: this cycle is the start of the sync segment
        presc    <= '0;
        tq_idx   <= '0;
        resynced <= 1'b1;
      end else if (fall && !resynced && !tx_dominant && tq_idx != '0) begin
        resynced <= 1'b1;
        if (tq_idx <= TW'(SP_IDX)) begin
          // late edge: lengthen phase segment 1
          tq_idx <= (tq_idx > TW'(SJW)) ? tq_idx - TW'(SJW) : TW'(1);
        end else if (TW'(NTQ) - tq_idx <= TW'(SJW)) begin
          // early edge within SJW: phase segment 2 ends now
          presc      <= '0;
          tq_idx     <= '0;
          tx_point_o <= 1'b1;
          resynced   <= 1'b0;
        end else begin
          tq_idx <= tq_idx + TW'(SJW);
        end
      end else if (tq_tick) begin
        presc <= '0;
        if (tq_idx == TW'(SP_IDX - 2)) smp[0] <= rx_s2;
        if (tq_idx == TW'(SP_IDX - 1)) smp[1] <= rx_s2;
        if (tq_idx == TW'(SP_IDX)) begin
          // 2-of-3 majority: dominant (0) wins when two samples are 0
          bit_o    <= (smp[0] & smp[1]) | (smp[0] & rx_s2) | (smp[1] & rx_s2);
          sample_o <= 1'b1;
        end
        if (tq_idx == TW'(NTQ - 1)) begin
          tq_idx     <= '0;
          tx_point_o <= 1'b1;
          resynced   <= 1'b0;
        end else begin
          tq_idx <= tq_idx + 1'b1;
        end
      end else begin
        presc <= presc + 1'b1;
      end
    end
  end

endmodule
