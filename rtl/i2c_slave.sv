// i2c_slave: I2C slave interface and configuration registers of the chip.
//
// SCL and SDA are oversampled by the chip clock (two-flop synchronisers, then
// edge detection), which at 40 MHz is ample for standard and fast mode. The
// 7-bit device address is taken from the address pins. Protocol:
//   write: S, addr+W, A, pointer, A, data, A, data, A ... P
//   read : S, addr+W, A, pointer, A, Sr, addr+R, A, data, A, data, N, P
// The pointer auto-increments after every data byte. SDA is open drain:
// sda_oe = 1 pulls the line low.
//
// Registers (8 bit):
//   0  clock fine delay   [4:0], 0..23 steps of 1.04 ns
//   1  trigger fine delay [4:0], 0..23
//   2  trigger coarse delay [3:0], 0..15 clock cycles
//   3  status, read only: {cal_failed, cal_done, high_gain, locked, ip_code}
// Unused bits read as 0; writes to 3 or above are ignored.
//
// The chip description only says that an I2C slave, with address pins,
// programs the internal registers; the register map, the protocol details and
// the oversampling scheme are this design's own.
//
// Ports: clk, rst_n async active low, dev_addr, scl, sda_in, sda_oe, status,
// cfg (register contents).
module i2c_slave
  import plldelay_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] dev_addr,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  input  status_t    status,
  output delay_cfg_t cfg
);
  timeunit 1ns;
  timeprecision 1fs;

  typedef enum logic [2:0] {
    ST_IDLE, ST_ADDR, ST_REG, ST_WDATA, ST_ACK, ST_RDATA, ST_RACK
  } i2c_state_t;

  logic [2:0] scl_sr, sda_sr;
  logic scl_rise, scl_fall, start_c, stop_c, sda_now;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl_sr <= '1;
      sda_sr <= '1;
    end else begin
      scl_sr <= {scl_sr[1:0], scl};
      sda_sr <= {sda_sr[1:0], sda_in};
    end

  assign sda_now  = sda_sr[1];
  assign scl_rise = scl_sr[1] & ~scl_sr[2];
  assign scl_fall = ~scl_sr[1] & scl_sr[2];
  assign start_c  = scl_sr[1] & scl_sr[2] & ~sda_sr[1] & sda_sr[2];
  assign stop_c   = scl_sr[1] & scl_sr[2] & sda_sr[1] & ~sda_sr[2];

  i2c_state_t state, after_ack;
  logic [7:0] shreg, outb, ptr;
  logic [3:0] bitcnt;
  logic       master_nack;

  function automatic logic [7:0] read_reg(input logic [7:0] a);
    unique case (a)
      REG_CLK_FINE:   return {3'b0, cfg.clk_fine};
      REG_TRG_FINE:   return {3'b0, cfg.trg_fine};
      REG_TRG_COARSE: return {4'b0, cfg.trg_coarse};
      REG_STATUS:     return status;
      default:        return 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= ST_IDLE;
      after_ack   <= ST_IDLE;
      shreg       <= '0;
      outb        <= '0;
      ptr         <= '0;
      bitcnt      <= '0;
      master_nack <= 1'b0;
      sda_oe      <= 1'b0;
      cfg         <= '0;
    end else begin
      if (start_c) begin
        state  <= ST_ADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= ST_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          ST_IDLE: sda_oe <= 1'b0;
          ST_ADDR, ST_REG, ST_WDATA: begin
            if (scl_rise && bitcnt != 4'd8) begin
              shreg  <= {shreg[6:0], sda_now};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              bitcnt <= '0;
              unique case (state)
                ST_ADDR: begin
                  if (shreg[7:1] == dev_addr) begin
                    sda_oe    <= 1'b1;
                    state     <= ST_ACK;
                    after_ack <= shreg[0] ? ST_RDATA : ST_REG;
                    outb      <= read_reg(ptr);
                  end else begin
                    state <= ST_IDLE;
                  end
                end
                ST_REG: begin
                  ptr       <= shreg;
                  sda_oe    <= 1'b1;
                  state     <= ST_ACK;
                  after_ack <= ST_WDATA;
                end
                default: begin  // ST_WDATA
                  unique case (ptr)
                    REG_CLK_FINE:   cfg.clk_fine   <= shreg[PHASE_W-1:0];
                    REG_TRG_FINE:   cfg.trg_fine   <= shreg[PHASE_W-1:0];
                    REG_TRG_COARSE: cfg.trg_coarse <= shreg[COARSE_W-1:0];
                    default: ;
                  endcase
                  ptr       <= ptr + 1'b1;
                  sda_oe    <= 1'b1;
                  state     <= ST_ACK;
                  after_ack <= ST_WDATA;
                end
              endcase
            end
          end
          ST_ACK: begin
            if (scl_fall) begin
              state  <= after_ack;
              bitcnt <= '0;
              sda_oe <= (after_ack == ST_RDATA) ? ~outb[7] : 1'b0;
            end
          end
          ST_RDATA: begin
            if (scl_rise) begin
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall) begin
              if (bitcnt == 4'd8) begin
                sda_oe <= 1'b0;
                state  <= ST_RACK;
              end else begin
                sda_oe <= ~outb[3'(7 - bitcnt)];
              end
            end
          end
          ST_RACK: begin
            if (scl_rise) begin
              master_nack <= sda_now;
            end else if (scl_fall) begin
              if (master_nack) begin
                state <= ST_IDLE;
              end else begin
                ptr    <= ptr + 1'b1;
                outb   <= read_reg(ptr + 1'b1);
                bitcnt <= '0;
                sda_oe <= ~read_reg(ptr + 1'b1)[7];
                state  <= ST_RDATA;
              end
            end
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
endmodule
