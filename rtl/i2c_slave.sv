// i2c_slave: standard I2C slave for setup and slow control.
// SCL and SDA are sampled with the chip clock (two-stage synchronisers), so
// the bus must be much slower than 40 MHz (standard and fast mode are). SDA
// is open drain: `sda_oe` high pulls the line low. The 7-bit device address
// is ADDR_HI followed by the 4 `addr_lo` bits, so up to 16 chips share a bus.
// Protocol (register-pointer style, this design's choice): a write sends the
// register address byte, then data bytes written to consecutive registers;
// a read returns bytes from the current register address, incrementing after
// each byte. Every byte is acknowledged. Register access: `reg_we` is a one
// cycle pulse with `reg_addr`/`reg_wdata`; `reg_rdata` is sampled when a read
// byte is loaded for shifting out.
`timescale 1ns / 1ps
module i2c_slave #(
  parameter logic [2:0] ADDR_HI = 3'b101
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] addr_lo,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  output logic       reg_we,
  input  logic [7:0] reg_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK_ADDR, S_WRITE, S_ACK_WR, S_READ, S_ACK_RD} st_t;

  logic [2:0] scl_s, sda_s;
  logic       scl_r, scl_f, start, stop;
  st_t        st;
  logic [7:0] sh;
  logic [3:0] bcnt;
  logic       rw, first_wr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end

  assign scl_r = scl_s[1] && !scl_s[2];
  assign scl_f = !scl_s[1] && scl_s[2];
  assign start = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop  = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st       <= S_IDLE;
      sh       <= '0;
      bcnt     <= '0;
      rw       <= 1'b0;
      first_wr <= 1'b0;
      sda_oe   <= 1'b0;
      reg_addr <= '0;
      reg_wdata<= '0;
      reg_we   <= 1'b0;
    end else begin
      reg_we <= 1'b0;
      if (start) begin
        st     <= S_ADDR;
        bcnt   <= '0;
        sda_oe <= 1'b0;
      end else if (stop) begin
        st     <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        case (st)
          S_ADDR: begin
            if (scl_r) begin
              sh   <= {sh[6:0], sda_s[1]};
              bcnt <= bcnt + 1'b1;
            end
            if (scl_f && bcnt == 4'd8) begin
              if (sh[7:1] == {ADDR_HI, addr_lo}) begin
                st       <= S_ACK_ADDR;
                rw       <= sh[0];
                first_wr <= 1'b1;
                sda_oe   <= 1'b1;
              end else st <= S_IDLE;
            end
          end
          S_ACK_ADDR: if (scl_f) begin
            bcnt <= '0;
            if (rw) begin
              st     <= S_READ;
              sh     <= reg_rdata;
              sda_oe <= !reg_rdata[7];
            end else begin
              st     <= S_WRITE;
              sda_oe <= 1'b0;
            end
          end
          S_WRITE: begin
            if (scl_r) begin
              sh   <= {sh[6:0], sda_s[1]};
              bcnt <= bcnt + 1'b1;
            end
            if (scl_f && bcnt == 4'd8) begin
              st     <= S_ACK_WR;
              sda_oe <= 1'b1;
              if (first_wr) begin
                reg_addr <= sh;
                first_wr <= 1'b0;
              end else begin
                reg_wdata <= sh;
                reg_we    <= 1'b1;
              end
            end
          end
          S_ACK_WR: begin
            if (reg_we) reg_addr <= reg_addr + 1'b1;
            if (scl_f) begin
              st     <= S_WRITE;
              bcnt   <= '0;
              sda_oe <= 1'b0;
            end
          end
          S_READ: begin
            if (scl_r) bcnt <= bcnt + 1'b1;
            if (scl_f) begin
              if (bcnt == 4'd8) begin
                st       <= S_ACK_RD;
                sda_oe   <= 1'b0;          // master drives ACK/NACK
                reg_addr <= reg_addr + 1'b1;
              end else begin
                sh     <= {sh[6:0], 1'b0};
                sda_oe <= !sh[6];
              end
            end
          end
          S_ACK_RD: begin
            if (scl_r && sda_s[1]) st <= S_IDLE;   // NACK: master is done
            else if (scl_f) begin
              st     <= S_READ;
              bcnt   <= '0;
              sh     <= reg_rdata;
              sda_oe <= !reg_rdata[7];
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
endmodule
