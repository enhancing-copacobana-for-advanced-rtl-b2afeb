// smbus_client: the module CPLD's client on the system-management bus, a
// two-wire, bit-serial bus (SMBus) that runs through the whole machine next to
// the parallel backplane bus. Through it the controller reads the module's
// temperatures and status and can re-enable a module after a thermal shutdown,
// independently of the data path.
//
// Protocol: SMBus "Read Byte" (S, address+W, command, Sr, address+R, data,
// NACK, P) and "Write Byte" (S, address+W, command, data, P), 7-bit address
// SMB_ADDR. Commands:
//   0..7  read: temperature of FPGA 0..7 in degrees Celsius
//   8     read: { hot bitmap } ; 9 read: { 7'b0, shutdown } ; 10 read: hottest
//   16    write: bit 0 = 1 clears a latched shutdown (pulse on 'clear')
// Further read bytes after an ACK repeat the same register.
//
// SCL and SDA are sampled with the CPLD clock through two flip-flops, so the
// clock must be at least about 10x the SCL rate. SDA is open drain: 'sda_pull'
// = 1 pulls the line low; the line's value (wired-AND of all devices) comes
// back on 'sda_i'. Data is changed only while SCL is low.
module smbus_client #(
  parameter logic [6:0]  SMB_ADDR = 7'h20,
  parameter int unsigned N_FPGAS  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scl_i,
  input  logic               sda_i,
  output logic               sda_pull,
  input  logic [7:0]         temp [N_FPGAS],
  input  logic [N_FPGAS-1:0] hot,
  input  logic               shutdown,
  input  logic [7:0]         temp_max,
  output logic               clear
);
  typedef enum logic [2:0] { B_IDLE, B_ADDR, B_ACK, B_RX, B_TX, B_MACK } bstate_e;

  logic [1:0] scl_s, sda_s;
  logic       scl_q, sda_q;
  logic       scl_rise, scl_fall, start_c, stop_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 2'b11; sda_s <= 2'b11; scl_q <= 1'b1; sda_q <= 1'b1;
    end else begin
      scl_s <= {scl_s[0], scl_i};
      sda_s <= {sda_s[0], sda_i};
      scl_q <= scl_s[1];
      sda_q <= sda_s[1];
    end
  end
  assign scl_rise = scl_s[1] && !scl_q;
  assign scl_fall = !scl_s[1] && scl_q;
  assign start_c  = scl_s[1] && scl_q && sda_q && !sda_s[1];
  assign stop_c   = scl_s[1] && scl_q && !sda_q && sda_s[1];

  bstate_e    st_q;
  logic [7:0] sh_q, cmd_q, tx_q;
  logic [3:0] cnt_q;
  logic       rw_q, have_cmd_q, mack_q;
  logic       after_ack_tx;   // what follows the ACK: transmit or receive

  function automatic logic [7:0] rd_reg(logic [7:0] c);
    if (c < 8'(N_FPGAS)) return temp[c[2:0]];
    unique case (c)
      8'd8:    return 8'(hot);
      8'd9:    return {7'd0, shutdown};
      8'd10:   return temp_max;
      default: return 8'hFF;
    endcase
  endfunction

  assign after_ack_tx = rw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= B_IDLE; sh_q <= '0; cmd_q <= '0; tx_q <= '0; cnt_q <= '0;
      rw_q <= 1'b0; have_cmd_q <= 1'b0; mack_q <= 1'b0; sda_pull <= 1'b0; clear <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (start_c) begin
        st_q <= B_ADDR; cnt_q <= '0; sda_pull <= 1'b0;
      end else if (stop_c) begin
        st_q <= B_IDLE; sda_pull <= 1'b0; have_cmd_q <= 1'b0;
      end else begin
        unique case (st_q)
          B_ADDR: begin
            if (scl_rise) begin
              sh_q  <= {sh_q[6:0], sda_s[1]};
              cnt_q <= cnt_q + 1'b1;
            end
            if (scl_fall && cnt_q == 4'd8) begin
              if (sh_q[7:1] == SMB_ADDR) begin
                rw_q     <= sh_q[0];
                sda_pull <= 1'b1;           // ACK
                st_q     <= B_ACK;
              end else st_q <= B_IDLE;
            end
          end
          B_ACK: if (scl_fall) begin
            cnt_q <= '0;
            if (after_ack_tx) begin
              tx_q     <= rd_reg(cmd_q);
              sda_pull <= !rd_reg(cmd_q)[7];
              st_q     <= B_TX;
            end else begin
              sda_pull <= 1'b0;
              st_q     <= B_RX;
            end
          end
          B_RX: begin
            if (scl_rise) begin
              sh_q  <= {sh_q[6:0], sda_s[1]};
              cnt_q <= cnt_q + 1'b1;
            end
            if (scl_fall && cnt_q == 4'd8) begin
              if (!have_cmd_q) begin
                cmd_q      <= sh_q;
                have_cmd_q <= 1'b1;
              end else if (cmd_q == 8'd16) begin
                clear <= sh_q[0];
              end
              sda_pull <= 1'b1;             // ACK every byte written to us
              st_q     <= B_ACK;
            end
          end
          B_TX: begin
            if (scl_rise) cnt_q <= cnt_q + 1'b1;
            if (scl_fall) begin
              if (cnt_q == 4'd8) begin
                sda_pull <= 1'b0;           // release for the master's ACK
                st_q     <= B_MACK;
              end else begin
                sda_pull <= !tx_q[3'd7 - cnt_q[2:0]];
              end
            end
          end
          B_MACK: begin
            if (scl_rise) mack_q <= !sda_s[1];
            if (scl_fall) begin
              if (mack_q) begin
                cnt_q    <= '0;
                tx_q     <= rd_reg(cmd_q);
                sda_pull <= !rd_reg(cmd_q)[7];
                st_q     <= B_TX;
              end else st_q <= B_IDLE;
            end
          end
          default: sda_pull <= 1'b0;
        endcase
      end
    end
  end
endmodule
