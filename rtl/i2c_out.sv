// i2c_out - I2C master writing a new frequency word into the Si571 VCXO (slow digital tune).
//
// On `start` the current rfreq (38-bit Si57x RFREQ word) and n1_lo (low two bits of the N1
// divider, which share register 8 with RFREQ[37:32]) are captured and three write transactions
// are sent to device address DEV_ADDR, following the Si57x procedure for changes smaller than
// +-3500 ppm that keeps the output running:
//   1. register 135 <- 0x20          (Freeze M)
//   2. registers 8..12 <- {n1_lo, rfreq[37:32]}, rfreq[31:24], [23:16], [15:8], [7:0]
//   3. register 135 <- 0x00          (release Freeze M; the new frequency takes effect)
// The bus is open drain: scl_oe / sda_oe = 1 pull the line low, 0 release it. Each bit takes
// four quarter periods of DIV clk cycles (DIV = 43 gives about 400 kHz SCL from f_dmtd). The
// slave's acknowledge is sampled from sda_i in the middle of the ninth SCL high time; a missing
// acknowledge sets nack (cleared at the next start) but the sequence completes. `start` while
// busy is ignored; done pulses for one cycle at the end.
//
// Timing: (3+7+3) bytes * 9 bits + 3 starts + 3 stops = 123 bit times, about 0.31 ms at
// 400 kHz, well inside one 55.6 ms frequency-detector window.
// From the design description: the frequency loop tunes the Si571 over I2C within +-3500 ppm of
// its centre setting. The register sequence, address 0x55 and bus rate are this design's choice,
// taken from the oscillator's usual programming interface.
module i2c_out #(
  parameter int unsigned DIV      = 43,
  parameter logic [6:0]  DEV_ADDR = 7'h55
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [37:0] rfreq,
  input  logic [1:0]  n1_lo,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i,
  output logic        busy,
  output logic        done,
  output logic        nack
);

  typedef enum logic [2:0] {I_IDLE, I_START, I_BIT, I_STOP} istate_t;

  localparam int unsigned DW = $clog2(DIV + 1);

  istate_t       st;
  logic [DW-1:0] div;
  logic [1:0]    q;          // quarter of the current bit
  logic [3:0]    bitn;       // 0..7 data bits, 8 = acknowledge
  logic [2:0]    byten;      // byte within the transaction
  logic [1:0]    trn;        // transaction 0..2
  logic [37:0]   rf_q;
  logic [1:0]    n1_q;
  logic [7:0]    cur_byte;
  logic [2:0]    nbytes;
  logic          tick;

  assign tick = (div == DW'(DIV - 1));
  assign busy = (st != I_IDLE);

  // byte `byten` of transaction `trn`
  always_comb begin
    nbytes   = (trn == 2'd1) ? 3'd7 : 3'd3;
    cur_byte = 8'h00;
    if (byten == 3'd0) cur_byte = {DEV_ADDR, 1'b0};
    else if (trn == 2'd1) begin
      unique case (byten)
        3'd1: cur_byte = 8'd8;
        3'd2: cur_byte = {n1_q, rf_q[37:32]};
        3'd3: cur_byte = rf_q[31:24];
        3'd4: cur_byte = rf_q[23:16];
        3'd5: cur_byte = rf_q[15:8];
        default: cur_byte = rf_q[7:0];
      endcase
    end else begin
      if (byten == 3'd1)      cur_byte = 8'd135;
      else if (trn == 2'd0)   cur_byte = 8'h20;
      else                    cur_byte = 8'h00;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= I_IDLE;
      div    <= '0;
      q      <= '0;
      bitn   <= '0;
      byten  <= '0;
      trn    <= '0;
      rf_q   <= '0;
      n1_q   <= '0;
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
      done   <= 1'b0;
      nack   <= 1'b0;
    end else begin
      done <= 1'b0;
      div  <= (st == I_IDLE || tick) ? '0 : div + 1'b1;
      unique case (st)
        I_IDLE: begin
          scl_oe <= 1'b0;
          sda_oe <= 1'b0;
          if (start) begin
            rf_q <= rfreq;
            n1_q <= n1_lo;
            trn  <= '0;
            nack <= 1'b0;
            q    <= '0;
            st   <= I_START;
          end
        end
        I_START: if (tick) begin
          // q0: both released, q1: SDA falls, q2/q3: SCL low
          q <= q + 1'b1;
          unique case (q)
            2'd0: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
            2'd1: sda_oe <= 1'b1;
            2'd2: scl_oe <= 1'b1;
            default: begin
              st    <= I_BIT;
              bitn  <= '0;
              byten <= '0;
            end
          endcase
        end
        I_BIT: if (tick) begin
          // q0: SCL low, set SDA; q1: SCL rises; q2: sample; q3: SCL falls
          q <= q + 1'b1;
          unique case (q)
            2'd0: begin
              scl_oe <= 1'b1;
              sda_oe <= (bitn == 4'd8) ? 1'b0 : !cur_byte[3'd7 - bitn[2:0]];
            end
            2'd1: scl_oe <= 1'b0;
            2'd2: if (bitn == 4'd8 && sda_i) nack <= 1'b1;
            default: begin
              scl_oe <= 1'b1;
              if (bitn == 4'd8) begin
                bitn <= '0;
                if (byten == nbytes - 1'b1) st <= I_STOP;
                else                        byten <= byten + 1'b1;
              end else begin
                bitn <= bitn + 1'b1;
              end
            end
          endcase
        end
        I_STOP: if (tick) begin
          // q0: SDA low with SCL low, q1: SCL rises, q2: SDA rises, q3: bus free
          q <= q + 1'b1;
          unique case (q)
            2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b0;
            default: begin
              if (trn == 2'd2) begin
                st   <= I_IDLE;
                done <= 1'b1;
              end else begin
                trn <= trn + 1'b1;
                st  <= I_START;
              end
            end
          endcase
        end
        default: st <= I_IDLE;
      endcase
    end
  end

endmodule
