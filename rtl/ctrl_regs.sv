// Control/status register block written by the embedded Linux host over the
// processor-to-FPGA AXI bridge (the parallel-IO registers of the design).
//
// AXI4-Lite slave, 32-bit data, word addresses (byte offsets):
//   0x00 CARRIER_STEP [8:0]  carrier step, f = 50e6*step/512 (reset 185)
//   0x04 MODE         [0]    0 = DSB, 1 = SSB                  (reset 0)
//   0x08 LO_STEP      [8:0]  Weaver audio oscillator step      (reset 18)
//   0x0C CODEC        [0]    input select, 0 = line, 1 = mic   (reset 0)
//                     [1]    write 1: re-run codec configuration (pulse)
//   0x10 DAC_CTRL     [0]    DAC enable                        (reset 1)
//   0x14 STATUS (RO)  [0] codec configured, [1] codec ack error, [2] busy
// Unused addresses read 0 and ignore writes; every response is OKAY.
// A write is taken when address and data are both valid and no response
// is waiting; a read when no read data is waiting. Write strobes select
// bytes.
//
// That the host sets carrier frequency, modulation mode and audio input
// through registers behind the AXI bridge follows the published design;
// the register map, reset values and bus details are choices of this
// implementation.
//
// Timing: a write updates its register on the clock it is accepted, and
// bvalid follows on the next; rvalid follows arvalid by one clock.
module ctrl_regs
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [7:0]  awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [7:0]  araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  // configuration outputs
  output phase_t      carrier_step,
  output mod_mode_e   mode,
  output phase_t      lo_step,
  output logic        input_sel,
  output logic        codec_start,
  output logic        dac_enable,
  // status inputs
  input  logic        codec_done,
  input  logic        codec_ack_error,
  input  logic        codec_busy
);

  localparam logic [7:0] A_STEP = 8'h00, A_MODE = 8'h04, A_LO = 8'h08,
                         A_CODEC = 8'h0C, A_DAC = 8'h10, A_STATUS = 8'h14;

  logic [31:0] wr_val;
  logic        wr_go;

  assign wr_go   = awvalid && wvalid && !bvalid;
  assign awready = wr_go;
  assign wready  = wr_go;
  assign arready = !rvalid;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;

  // merge the strobed bytes into the current register value
  function automatic logic [31:0] merge(input logic [31:0] old_v, input logic [31:0] new_v,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++)
      merge[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
  endfunction

  function automatic logic [31:0] read_reg(input logic [7:0] addr);
    case (addr)
      A_STEP:   return 32'(carrier_step);
      A_MODE:   return 32'(mode);
      A_LO:     return 32'(lo_step);
      A_CODEC:  return 32'(input_sel);
      A_DAC:    return 32'(dac_enable);
      A_STATUS: return {29'd0, codec_busy, codec_ack_error, codec_done};
      default:  return 32'd0;
    endcase
  endfunction

  always_comb wr_val = merge(read_reg(awaddr), wdata, wstrb);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carrier_step <= DEFAULT_STEP;
      mode         <= MODE_DSB;
      lo_step      <= DEFAULT_LO_STEP;
      input_sel    <= 1'b0;
      codec_start  <= 1'b0;
      dac_enable   <= 1'b1;
      bvalid       <= 1'b0;
      rvalid       <= 1'b0;
      rdata        <= '0;
    end else begin
      codec_start <= 1'b0;
      if (wr_go) begin
        bvalid <= 1'b1;
        case (awaddr)
          A_STEP:  carrier_step <= wr_val[PHASE_W-1:0];
          A_MODE:  mode         <= mod_mode_e'(wr_val[0]);
          A_LO:    lo_step      <= wr_val[PHASE_W-1:0];
          A_CODEC: begin
            input_sel   <= wr_val[0];
            codec_start <= wstrb[0] & wdata[1];
          end
          A_DAC:   dac_enable   <= wr_val[0];
          default: ;
        endcase
      end else if (bready) begin
        bvalid <= 1'b0;
      end
      if (arvalid && !rvalid) begin
        rvalid <= 1'b1;
        rdata  <= read_reg(araddr);
      end else if (rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response stays valid until it is accepted
  property p_hold(valid, ready);
    @(posedge clk) disable iff (!rst_n) valid && !ready |=> valid;
  endproperty
  a_bvalid_hold: assert property (p_hold(bvalid, bready));
  a_rvalid_hold: assert property (p_hold(rvalid, rready));

endmodule
