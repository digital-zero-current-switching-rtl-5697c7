// sampling_block: reads the ZCD sensors after each tank's turn-off command and
// hands one reading per tank and switching cycle to the autotuner.
//
// The sensor output only tells early from late switching near the turn-off
// event, and the gate-to-transistor delay in between is unknown, so the
// reading has to be taken in the right window. Two methods are built, chosen
// by 'mode':
//
//  mode 0, continuous sampling: from the clock after tank x's turn-off
//    command until the end of the deadtime the sensor is sampled on every
//    clock. A small state machine keeps the first reading that is not ZCS
//    (2'b11 early or 2'b00 late); if the window shows only ZCS the tank
//    switched at zero current. Keeping the first non-ZCS reading is this
//    design's choice of state machine.
//
//  mode 1, single sample: one sample is taken ds[x] after the gate actually
//    falls, with the resolution of one delay element. The gate falls
//    ton[x].fine elements after the coarse turn-off edge, so the strobe is
//    placed at (fine + ds) after that edge: whole clocks are counted here, the
//    remainder goes through a delay line, and the strobe's rising edge
//    captures the sensor output. A position below one clock needs no
//    counting: off_evt itself, which rises on the turn-off edge, is sent
//    through the delay line. If the strobe does not fire before the end of
//    the deadtime the reading is "ZCS" (no information). A capture is
//    handed over only in the cycle it was taken in: captures older than the
//    clock after chg_end are dropped.
//
// Both methods report at the end of the charge-phase deadtime: samp[] is
// updated and samp_valid pulses for one clock one edge after chg_end.
`timescale 1ns / 1ps
module sampling_block
  import lockin_pkg::*;
#(
  parameter int unsigned N_TANKS  = 2,
  parameter real         T_BUF_NS = 0.2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode,                 // 0 continuous, 1 single sample
  input  ton_t       ton [N_TANKS],        // on-times in use (for the fine part)
  input  ton_t       ds  [N_TANKS],        // sampling delay after the gate falls
  input  logic [N_TANKS-1:0] off_evt,
  input  logic       chg_end,
  input  logic [1:0] zcd [N_TANKS],        // sensor outputs, asynchronous
  output zcd_t       samp [N_TANKS],
  output logic       samp_valid
);

  for (genvar g = 0; g < N_TANKS; g++) begin : g_tank
    // ---- continuous sampling ---------------------------------------------
    logic win;        // sampling window open
    zcd_t first;      // first non-ZCS reading of the window
    logic got;        // a non-ZCS reading was seen

    // ---- single sample -----------------------------------------------------
    ton_t                   when_t;   // strobe position after the coarse edge
    logic [COARSE_BITS-1:0] k;        // clocks still to wait
    logic                   armed;
    logic                   strb_sync, strb_src, strb_dly;
    logic [1:0]             cap;      // captured sensor code
    logic                   cap_tgl, cap_ack;

    assign when_t = ton_add(mk_ton('0, ton[g].fine), ds[g]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        win <= 1'b0; first <= ZCD_ZCS; got <= 1'b0;
        k <= '0; armed <= 1'b0; strb_sync <= 1'b0; cap_ack <= 1'b0;
        samp[g] <= ZCD_ZCS;
      end else begin
        strb_sync <= 1'b0;
        if (off_evt[g]) begin
          // clock after the turn-off edge: open the window, take 1st sample
          win   <= 1'b1;
          got   <= (zcd[g] != ZCD_ZCS);
          first <= zcd_t'(zcd[g]);
          armed <= 1'b1;
          if (when_t.coarse == 8'd0) begin
            armed     <= 1'b0;              // off_evt already launched it
          end else if (when_t.coarse == 8'd1) begin
            strb_sync <= 1'b1;              // strobe edge = next clock edge
            armed     <= 1'b0;
          end else k <= when_t.coarse - 8'd2;
        end else begin
          if (win && !got && zcd[g] != ZCD_ZCS) begin
            got   <= 1'b1;
            first <= zcd_t'(zcd[g]);
          end
          if (armed) begin
            if (k == '0) begin
              strb_sync <= 1'b1;
              armed     <= 1'b0;
            end else k <= k - 1'b1;
          end
        end
        if (samp_valid)
          cap_ack <= cap_tgl;               // forget captures of this cycle
        if (chg_end) begin
          win   <= 1'b0;
          armed <= 1'b0;
          if (!mode) samp[g] <= got ? first : ZCD_ZCS;
          else if (cap_tgl != cap_ack) begin
            samp[g] <= zcd_t'(cap);
            cap_ack <= cap_tgl;
          end else samp[g] <= ZCD_ZCS;
        end
      end
    end

    // Fine placement of the strobe and the capture flip-flop. Below one
    // clock the strobe starts from the turn-off edge itself (off_evt), else
    // from the clock edge that ends the count.
    assign strb_src = (when_t.coarse == '0) ? off_evt[g] : strb_sync;

    delay_line #(.TAPS(1 << FINE_BITS), .SEL_W(FINE_BITS), .T_BUF_NS(T_BUF_NS)) u_dl (
      .din(strb_src), .sel(when_t.fine), .dout(strb_dly));

    always_ff @(posedge strb_dly or negedge rst_n) begin
      if (!rst_n) begin
        cap     <= 2'b01;
        cap_tgl <= 1'b0;
      end else begin
        cap     <= zcd[g];
        cap_tgl <= ~cap_tgl;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) samp_valid <= 1'b0;
    else        samp_valid <= chg_end;
  end

endmodule
