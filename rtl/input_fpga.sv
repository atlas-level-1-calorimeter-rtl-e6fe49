// input_fpga: one input processor of the JEM (eleven per module).
//
// It receives 8 deserialised links, 4 electromagnetic and 4 hadronic, that
// belong to one phi row and 4 eta bins. Per channel the word is re-timed
// onto the bunch clock (lvds_sync), optionally replaced by playback data,
// checked for parity and link lock and masked (link_monitor). The em and
// had energies of each eta bin are added into jet elements with saturation,
// threshold and FCAL halving (jet_element_former), and each element is sent
// as 5-bit words at twice the bunch clock (je_mux): all four to the main
// processor, the two leftmost (lowest eta) to the left neighbour JEM and the
// rightmost to the right neighbour. The synchronised link data with their
// lock status form the 88-bit DAQ slice, which a readout_sequencer pipelines
// and sends as one serial stream on ReadRequest.
//
// Registers (byte address, from the document's register map): 00 VERSION,
// 02 CONTROL (pulses: bit0 clear lock-loss counters and LL_REG1, bit1 clear
// parity counters and PARITY_ERR_REG, bit2 reset playback address), 04
// STATUS (bit0 DLL lock, bit1 all unmasked links locked), 06 THRESHOLD, 08
// MASK (1 = channel off), 10 CLK_PHASE_EM, 12 CLK_PHASE_HAD, 14 DELAY_REG,
// 20 LL_REG1 (sticky lock loss), 22 LL_REG2 (current lock, 1 = locked),
// 24 PARITY_ERR_REG, 30-3E lock-loss counters, 40-4E parity counters
// (cleared when read), 50 PLAY_MEM (write only). Channel bit order 1e..4e,
// 1h..4h. Phase registers are writable here (the document marks them RO but
// says they are set by VME). During playback the lock check is bypassed
// (this design's choice).
//
// Timing: clk is 4x the bunch clock. Register reads return data on the
// clock after the access. TTC lines are sampled with ce40.
module input_fpga
  import jem_pkg::*;
#(
  parameter int          PIPE_DEPTH = 48,
  parameter logic [15:0] VERSION    = 16'h0001
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [1:0]           ph,
  input  logic                 ce40,
  input  logic [7:0][9:0]      rx_data,
  input  logic [7:0]           rx_lock_n,
  input  logic [7:0]           ttc,
  input  logic                 read_req,
  input  logic [3:0]           fcal_mask,
  input  logic                 dll_locked,
  input  regbus_t              rb,
  output logic [15:0]          rdata,
  output logic [3:0][4:0]      je_main,
  output logic [1:0][4:0]      je_left,
  output logic [4:0]           je_right,
  output logic                 daq_ser,
  output logic                 daq_valid
);
  // Registers.
  logic [8:0]  thr_reg;
  logic [7:0]  mask_reg, phase_em, phase_had, delay_reg;
  logic        ctl_clr_ll, ctl_clr_pe, ctl_clr_play, play_wr;
  logic [7:0]  rd_llc, rd_pec;
  logic        wr, rd;

  assign wr = rb.cs && rb.wr;
  assign rd = rb.cs && !rb.wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      thr_reg   <= '0;
      mask_reg  <= '0;
      phase_em  <= '0;
      phase_had <= '0;
      delay_reg <= '0;
    end else if (wr) begin
      case (rb.addr)
        7'h06: thr_reg   <= rb.wdata[8:0];
        7'h08: mask_reg  <= rb.wdata[7:0];
        7'h10: phase_em  <= rb.wdata[7:0];
        7'h12: phase_had <= rb.wdata[7:0];
        7'h14: delay_reg <= rb.wdata[7:0];
        default: ;
      endcase
    end
  end

  assign ctl_clr_ll   = wr && rb.addr == 7'h02 && rb.wdata[0];
  assign ctl_clr_pe   = wr && rb.addr == 7'h02 && rb.wdata[1];
  assign ctl_clr_play = wr && rb.addr == 7'h02 && rb.wdata[2];
  assign play_wr      = wr && rb.addr == 7'h50;
  for (genvar c = 0; c < 8; c++) begin : g_rdclr
    assign rd_llc[c] = rd && rb.addr == 7'(8'h30 + 2*c);
    assign rd_pec[c] = rd && rb.addr == 7'(8'h40 + 2*c);
  end

  // Channels.
  logic [7:0][9:0] sync_d, play_d, chk_d;
  logic [7:0]      sync_lock_n, chk_lock_n;
  logic [7:0][8:0] energy;
  logic [7:0]      pe_flag, ll_flag;
  logic [7:0][7:0] pec;
  logic [7:0][3:0] llc;
  logic            play_active;

  playback_mem #(.DEPTH(256), .NCH(8), .W(10)) u_play (
    .clk, .rst, .ce40,
    .wr(play_wr), .wdata(rb.wdata[9:0]), .clr_addr(ctl_clr_play),
    .start(ttc[TTC_START_PLAY]), .stop(ttc[TTC_STOP_PLAY]),
    .active(play_active), .dout(play_d)
  );

  for (genvar c = 0; c < 8; c++) begin : g_ch
    logic [1:0] psel;
    assign psel = (c < 4) ? phase_em[2*(c%4) +: 2] : phase_had[2*(c%4) +: 2];
    lvds_sync #(.W(10)) u_sync (
      .clk, .rst, .ph, .ce40,
      .din(rx_data[c]), .lock_n(rx_lock_n[c]),
      .phase_sel(psel), .extra_delay(delay_reg[c]),
      .dout(sync_d[c]), .lock_n_sync(sync_lock_n[c])
    );
    assign chk_d[c]      = play_active ? play_d[c] : sync_d[c];
    assign chk_lock_n[c] = play_active ? 1'b0 : sync_lock_n[c];
    link_monitor #(.PEC_W(8), .LLC_W(4)) u_mon (
      .clk, .rst, .ce40,
      .din(chk_d[c]), .lock_n(chk_lock_n[c]), .mask(mask_reg[c]),
      .clr_ll_cnt(ctl_clr_ll || rd_llc[c]), .clr_ll_flag(ctl_clr_ll),
      .clr_pe_cnt(ctl_clr_pe || rd_pec[c]), .clr_pe_flag(ctl_clr_pe),
      .energy(energy[c]), .par_err_flag(pe_flag[c]), .ll_flag(ll_flag[c]),
      .pec(pec[c]), .llc(llc[c])
    );
  end

  // Jet elements.
  je_t [3:0] je;
  jet_element_former #(.N(4)) u_form (
    .clk, .rst, .ce40,
    .em(energy[3:0]), .had(energy[7:4]),
    .threshold(thr_reg), .fcal_mask,
    .je
  );

  for (genvar i = 0; i < 4; i++) begin : g_mux
    je_mux u_mux (.clk, .rst, .ph, .je(je[i]), .dout(je_main[i]));
  end
  assign je_left  = je_main[1:0];
  assign je_right = je_main[3];

  // DAQ slice: per channel {link locked, 10 data bits}, channel 1e first.
  logic [SLICE_W-1:0] slice;
  always_comb begin
    for (int c = 0; c < 8; c++)
      slice[SLICE_W-1-11*c -: 11] = {~sync_lock_n[c], sync_d[c]};
  end

  readout_sequencer #(.W(SLICE_W), .LANES(1), .PIPE_DEPTH(PIPE_DEPTH),
                      .FIFO_DEPTH(256)) u_ros (
    .clk, .rst, .ce40,
    .din(slice), .read_req,
    .ser(daq_ser), .valid(daq_valid),
    .fifo_count(), .overflow()
  );

  // Register read-back.
  logic all_locked;
  assign all_locked = &(~sync_lock_n | mask_reg);

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (rd) begin
      rdata <= '0;
      case (rb.addr)
        7'h00: rdata <= VERSION;
        7'h04: rdata <= {14'd0, all_locked, dll_locked};
        7'h06: rdata <= {7'd0, thr_reg};
        7'h08: rdata <= {8'd0, mask_reg};
        7'h10: rdata <= {8'd0, phase_em};
        7'h12: rdata <= {8'd0, phase_had};
        7'h14: rdata <= {8'd0, delay_reg};
        7'h20: rdata <= {8'd0, ll_flag};
        7'h22: rdata <= {8'd0, ~sync_lock_n};
        7'h24: rdata <= {8'd0, pe_flag};
        default: begin
          for (int c = 0; c < 8; c++) begin
            if (rb.addr == 7'(8'h30 + 2*c)) rdata <= {12'd0, llc[c]};
            if (rb.addr == 7'(8'h40 + 2*c)) rdata <= {8'd0, pec[c]};
          end
        end
      endcase
    end
  end
endmodule
