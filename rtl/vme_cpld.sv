// vme_cpld: reduced VME slave of the JEM (A24/D16) with module registers and
// the FPGA configuration port.
//
// The backplane offers only A23..A1, D15..D0, DS0*, WRITE*, DTACK* and
// SYSRESET. An access starts when DS0* falls. It belongs to this module if
// A23 = 1, A22..A19 equal the JEM number taken from the geographic address
// pins (GEOADD3..0) and A18 = 0; A17..A14 then give the sub-base address of
// the device (0 this CPLD, 1 control FPGA, 2 ROC, 3 main processor, 4..14
// input processors) and A6..A1 the register (byte address A6..A0 with A0 = 0). Accesses to sub-base 1..14 are
// passed to the control FPGA. Every access to the module is answered with
// DTACK*, also for unused addresses, which read as 0. DTACK* is driven a
// fixed ACK_CYCLES clocks after DS0* falls and released when DS0* rises;
// read data are driven on the data bus while DTACK* is low. The bit
// positions of the address fields are this design's reading of the map.
//
// Registers (byte address): 00 MOD_ID_A, 02 MOD_ID_B ({revision, serial}),
// 04 VERSION, 06 STATUS (bit0 TTC clock available, bit1 configuration
// busy), 10 CFG_MASK_REG, 12 FPGA_RESET_REG, 14 CFG_REG. Bits of CFG_MASK and
// FPGA_RESET: 0 control, 1 ROC, 2 main, 3..13 input V, A..H, W, Z. A write to
// CFG_REG sends its 16 bits, MSB first, on the DIN lines of the selected
// FPGAs, each bit with a CCLK pulse (two clocks per bit). The CAN node
// address is the geographic address.
//
// Timing: clk is the board clock (4x bunch clock here); VME inputs are
// synchronised with two flip-flops.
module vme_cpld #(
  parameter logic [15:0] MOD_ID_A   = 16'h4A45,  // module type code
  parameter logic [7:0]  SERIAL     = 8'd0,
  parameter logic [7:0]  REVISION   = 8'd0,
  parameter logic [15:0] VERSION    = 16'h0001,
  parameter int          ACK_CYCLES = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [23:1]  vme_a,
  input  logic [15:0]  vme_d_in,
  output logic [15:0]  vme_d_out,
  output logic         vme_d_oe,
  input  logic         vme_ds0_n,
  input  logic         vme_write_n,
  output logic         vme_dtack_n,
  input  logic [5:0]   geoadd,
  input  logic         ttc_clk_ok,
  // to the control FPGA
  output logic         req_valid,
  output logic         req_wr,
  output logic [3:0]   req_sub,
  output logic [6:0]   req_addr,
  output logic [15:0]  req_wdata,
  input  logic [15:0]  req_rdata,
  // configuration and reset of the FPGAs
  output logic [13:0]  cfg_din,
  output logic [13:0]  cfg_cclk,
  output logic [13:0]  fpga_reset,
  output logic [5:0]   can_node_addr
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACK} state_e;
  state_e state;

  logic [2:0]  ds_s;
  logic        ds_fall, ds_high;
  logic [23:1] a_q;
  logic [15:0] d_q;
  logic        wr_q, local_q;
  logic [$clog2(ACK_CYCLES+1)-1:0] cnt;
  logic        hit;

  logic [13:0] cfg_mask, rst_reg;
  logic [15:0] cfg_sh;
  logic [4:0]  cfg_cnt;
  logic        cfg_phase, cfg_bit, cfg_clk;

  always_ff @(posedge clk) begin
    if (rst) ds_s <= '1;
    else     ds_s <= {ds_s[1:0], vme_ds0_n};
  end
  assign ds_fall = ds_s[2] && !ds_s[1];
  assign ds_high = ds_s[1];
  assign hit     = vme_a[23] && (vme_a[22:19] == geoadd[3:0]) && !vme_a[18];

  logic local_wr;
  assign local_wr = (state == S_WAIT) && (cnt == '0) && local_q && wr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      a_q         <= '0;
      d_q         <= '0;
      wr_q        <= 1'b0;
      local_q     <= 1'b0;
      cnt         <= '0;
      req_valid   <= 1'b0;
      vme_dtack_n <= 1'b1;
      vme_d_oe    <= 1'b0;
      vme_d_out   <= '0;
    end else begin
      req_valid <= 1'b0;
      case (state)
        S_IDLE: if (ds_fall && hit) begin
          a_q       <= vme_a;
          d_q       <= vme_d_in;
          wr_q      <= !vme_write_n;
          local_q   <= (vme_a[17:14] == 4'd0);
          req_valid <= (vme_a[17:14] != 4'd0) && (vme_a[17:14] != 4'd15);
          cnt       <= '0;
          state     <= S_WAIT;
        end
        S_WAIT: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == ACK_CYCLES - 1) begin
            if (local_q) begin
              case ({a_q[6:1], 1'b0})
                7'h00: vme_d_out <= MOD_ID_A;
                7'h02: vme_d_out <= {REVISION, SERIAL};
                7'h04: vme_d_out <= VERSION;
                7'h06: vme_d_out <= {14'd0, (cfg_cnt != 0), ttc_clk_ok};
                7'h10: vme_d_out <= {2'd0, cfg_mask};
                7'h12: vme_d_out <= {2'd0, rst_reg};
                default: vme_d_out <= '0;
              endcase
            end else if (a_q[17:14] == 4'd15) begin
              vme_d_out <= '0;
            end else begin
              vme_d_out <= req_rdata;
            end
            vme_d_oe    <= !wr_q;
            vme_dtack_n <= 1'b0;
            state       <= S_ACK;
          end
        end
        default: if (ds_high) begin
          vme_dtack_n <= 1'b1;
          vme_d_oe    <= 1'b0;
          state       <= S_IDLE;
        end
      endcase
    end
  end

  assign req_wr    = wr_q;
  assign req_sub   = a_q[17:14];
  assign req_addr  = {a_q[6:1], 1'b0};
  assign req_wdata = d_q;

  // Module registers and configuration serialiser.
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_mask  <= '0;
      rst_reg   <= '0;
      cfg_sh    <= '0;
      cfg_cnt   <= '0;
      cfg_phase <= 1'b0;
      cfg_bit   <= 1'b0;
      cfg_clk   <= 1'b0;
    end else begin
      if (local_wr) begin
        case ({a_q[6:1], 1'b0})
          7'h10: cfg_mask <= d_q[13:0];
          7'h12: rst_reg  <= d_q[13:0];
          7'h14: if (cfg_cnt == 0) begin
            cfg_sh    <= d_q;
            cfg_cnt   <= 5'd16;
            cfg_phase <= 1'b0;
          end
          default: ;
        endcase
      end
      if (cfg_cnt != 0) begin
        if (!cfg_phase) begin
          cfg_bit <= cfg_sh[15];
          cfg_clk <= 1'b0;
        end else begin
          cfg_clk <= 1'b1;
          cfg_sh  <= {cfg_sh[14:0], 1'b0};
          cfg_cnt <= cfg_cnt - 1'b1;
        end
        cfg_phase <= !cfg_phase;
      end else begin
        cfg_clk <= 1'b0;
      end
    end
  end

  assign cfg_din       = cfg_mask & {14{cfg_bit}};
  assign cfg_cclk      = cfg_mask & {14{cfg_clk}};
  assign fpga_reset    = rst_reg;
  assign can_node_addr = geoadd;
endmodule
