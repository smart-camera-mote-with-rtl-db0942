// i2c_prog_loader: I2C slave through which the host loads GCP programs.
//
// The host writes IC3D programs over I2C while the camera runs. This slave is
// write-only. A transfer is
//   START, {DEV_ADDR, W}, program address high byte, low byte,
//   then NBYTES bytes per instruction word (most significant byte first,
//   unused top bits ignored), repeated for consecutive words, STOP.
// Every byte addressed to DEV_ADDR is acknowledged; other device addresses,
// and read requests, are ignored until the next START. Each completed
// instruction produces one prog_we pulse with prog_addr/prog_wdata, and the
// program address then increments.
//
// SCL and SDA are sampled with the system clock through two-flop
// synchronisers, so the system clock must be well above the SCL rate (at
// least 8x is comfortable). sda_oe pulls SDA low when set (open drain).
// Program download over I2C is the camera's mechanism; the framing, device
// address and byte order are this design's choices.
module i2c_prog_loader #(
  parameter logic [6:0]  DEV_ADDR = 7'h2A,
  parameter int unsigned IW       = 67,     // instruction width
  parameter int unsigned PCW      = 8,      // program address width
  localparam int unsigned NBYTES  = (IW + 7) / 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           scl,
  input  logic           sda,
  output logic           sda_oe,
  output logic           prog_we,
  output logic [PCW-1:0] prog_addr,
  output logic [IW-1:0]  prog_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_BITS, S_ACK, S_IGNORE} state_e;

  logic [2:0]  scl_s, sda_s;
  logic        scl_rise, scl_fall, start_c, stop_c;
  state_e      state;
  logic [3:0]  bitcnt;
  logic [7:0]  shreg;
  logic [7:0]  byte_idx;
  logic [$clog2(NBYTES+1)-1:0] kcnt;
  logic [15:0] waddr;
  logic [NBYTES*8-1:0] ibuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda};
    end
  end

  assign scl_rise = scl_s[1] & ~scl_s[2];
  assign scl_fall = ~scl_s[1] & scl_s[2];
  assign start_c  = scl_s[1] & scl_s[2] & ~sda_s[1] & sda_s[2];
  assign stop_c   = scl_s[1] & scl_s[2] & sda_s[1] & ~sda_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bitcnt     <= '0;
      shreg      <= '0;
      byte_idx   <= '0;
      kcnt       <= '0;
      waddr      <= '0;
      ibuf       <= '0;
      sda_oe     <= 1'b0;
      prog_we    <= 1'b0;
      prog_addr  <= '0;
      prog_wdata <= '0;
    end else begin
      prog_we <= 1'b0;
      if (start_c) begin
        state    <= S_BITS;
        bitcnt   <= '0;
        byte_idx <= '0;
        kcnt     <= '0;
        sda_oe   <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_BITS: begin
            if (scl_rise && bitcnt < 4'd8) begin
              shreg  <= {shreg[6:0], sda_s[1]};
              bitcnt <= bitcnt + 4'd1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              if (byte_idx == 8'd0 && (shreg[7:1] != DEV_ADDR || shreg[0])) begin
                state <= S_IGNORE;
              end else begin
                state  <= S_ACK;
                sda_oe <= 1'b1;
                if (byte_idx != 8'hFF) byte_idx <= byte_idx + 8'd1;
                if (byte_idx == 8'd1) waddr[15:8] <= shreg;
                if (byte_idx == 8'd2) waddr[7:0]  <= shreg;
                if (byte_idx >= 8'd3) begin
                  if (32'(kcnt) == NBYTES - 1) begin
                    kcnt       <= '0;
                    prog_we    <= 1'b1;
                    prog_addr  <= waddr[PCW-1:0];
                    prog_wdata <= IW'({ibuf[NBYTES*8-9:0], shreg});
                    waddr      <= waddr + 16'd1;
                  end else begin
                    kcnt <= kcnt + 1'b1;
                    ibuf <= {ibuf[NBYTES*8-9:0], shreg};
                  end
                end
              end
            end
          end
          S_ACK: begin
            if (scl_fall) begin
              sda_oe <= 1'b0;
              bitcnt <= '0;
              state  <= S_BITS;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
