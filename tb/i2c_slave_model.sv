// Behavioural model of the codec's two-wire control port (write only).
// Oversamples SCL/SDA with the testbench clock, detects START and STOP,
// shifts bits in on rising SCL, acknowledges each byte by pulling SDA low
// for the ninth clock (unless nack is set) and, at each STOP after three
// bytes, stores the device byte and the 16-bit control word.
module i2c_slave_model (
  input  logic        clk,
  input  logic        scl,
  input  logic        sda,
  input  logic        nack,
  output logic        sda_pull,
  output int          n_words,
  output logic [15:0] words [32],
  output logic [7:0]  dev_bytes [32]
);
  logic       scl_q = 1'b1, sda_q = 1'b1;
  logic       ack_phase = 1'b0;
  int         bitcnt = 0, bytecnt = 0;
  logic [7:0] sh = '0;
  logic [7:0] bytes [3];

  initial begin sda_pull = 1'b0; n_words = 0; end

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin          // START
      bitcnt <= 0; bytecnt <= 0; ack_phase <= 1'b0;
    end else if (scl && scl_q && !sda_q && sda) begin  // STOP
      if (bytecnt == 3 && n_words < 32) begin
        dev_bytes[n_words] <= bytes[0];
        words[n_words]     <= {bytes[1], bytes[2]};
        n_words            <= n_words + 1;
      end
    end else if (scl && !scl_q) begin                 // rising SCL
      if (!ack_phase) begin
        sh <= {sh[6:0], sda};
        bitcnt <= bitcnt + 1;
      end
    end else if (!scl && scl_q) begin                 // falling SCL
      if (ack_phase) begin
        sda_pull <= 1'b0; ack_phase <= 1'b0; bitcnt <= 0;
      end else if (bitcnt == 8) begin
        if (bytecnt < 3) bytes[bytecnt] <= sh;
        bytecnt   <= bytecnt + 1;
        sda_pull  <= !nack;
        ack_phase <= 1'b1;
      end
    end
  end
endmodule
