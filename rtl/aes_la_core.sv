// aes_la_core: low-area AES-128 encryptor with an 8-bit datapath.
//
// Everything works one byte per clock around a 16-byte state memory. A read
// address (first multiplexer) picks any byte of any row or column; the
// operation units are one S-box (SubBytes, shared with the key schedule), a
// 4-byte shift register on top of a byte-serial MixColumn (la_shift_mix) that
// also performs ShiftRows by rotating rows, and an XOR with the round key
// (AddRoundKey); a second multiplexer picks which result is written back to
// the state memory. There is no separate ShiftRows unit: the feedback path
// through the shift register rotates each row as often as needed.
//
// Control (the "control unit" of the document) is the FSM below. Per block:
//   LOAD  16 clocks : state bytes arrive on din with data_we, order 4*c + r
//   ARK   16        : initial AddRoundKey
//   per round 1..10:
//     KEY 16        : next round key, byte-serial, shared S-box
//     SB  16        : SubBytes
//     SR  30        : rows 1..3, each loaded (4), rotated r times, written (4)
//     MC  32        : rounds 1..9 only, each column loaded (4), written (4)
//     ARK 16        : AddRoundKey
//   OUT   16        : ciphertext bytes on dout with dout_valid
// The first output byte appears LATENCY = 1085 clocks after the clock that
// carried the last input byte. The key (16 bytes, key_we) must be loaded
// while busy is low; it is kept and reused for every block. Assertions flag
// key or data bytes offered while busy.
// Data flow and units follow the document; the FSM schedule, the byte order
// and the key handling are this design's own. Encryption only: the document
// describes no decryption path for this design.
module aes_la_core (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] din,
  input  logic       key_we,
  input  logic       data_we,
  output logic [7:0] dout,
  output logic       dout_valid,
  output logic       busy
);
  import aes_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_ARK, S_KEY, S_SB, S_SR_LOAD, S_SR_ROT, S_SR_WR, S_MC_LOAD, S_MC_WR, S_OUT
  } la_state_e;

  la_state_e  st;
  logic [3:0] cnt;        // byte counter for 16-clock phases
  logic [3:0] kcnt;       // key byte input counter
  logic [3:0] rnd;        // current round
  logic [1:0] row, col, sub;

  // datapath signals
  logic [3:0] raddr, waddr;
  logic [7:0] rdata, wdata, sdata, sb_in, sb_out, ks_sb_in, rk_byte, sr_out, mc_out;
  logic       we, sm_load, sm_rot, ks_start, ks_step;

  la_state_mem u_mem (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .raddr2(cnt), .rdata2(sdata)
  );

  aes_sbox #(.STAGES(0)) u_sbox (
    .clk(clk), .dec(1'b0), .din(sb_in), .dout(sb_out)
  );

  la_shift_mix u_sm (
    .clk(clk), .load(sm_load), .rot(sm_rot), .din(rdata), .sr_out(sr_out), .mc_out(mc_out)
  );

  la_key_sched u_ks (
    .clk(clk), .load(key_we && st == S_IDLE), .load_addr(kcnt), .din(din),
    .start(ks_start), .step(ks_step), .step_idx(cnt),
    .sb_in(ks_sb_in), .sb_out(sb_out), .rk_addr(cnt), .rk_byte(rk_byte)
  );

  // operation multiplexers
  always_comb begin
    raddr    = cnt;
    waddr    = cnt;
    wdata    = din;
    we       = 1'b0;
    sm_load  = 1'b0;
    sm_rot   = 1'b0;
    ks_start = 1'b0;
    ks_step  = 1'b0;
    sb_in    = rdata;
    case (st)
      S_IDLE: begin
        we       = data_we;
        ks_start = data_we && cnt == 4'd15;
      end
      S_ARK: begin
        we    = 1'b1;
        wdata = rdata ^ rk_byte;
      end
      S_KEY: begin
        sb_in   = ks_sb_in;
        ks_step = 1'b1;
      end
      S_SB: begin
        we    = 1'b1;
        wdata = sb_out;
      end
      S_SR_LOAD: begin
        raddr   = {sub, row};
        sm_load = 1'b1;
      end
      S_SR_ROT: sm_rot = 1'b1;
      S_SR_WR: begin
        waddr  = {sub, row};
        wdata  = sr_out;
        we     = 1'b1;
        sm_rot = 1'b1;
      end
      S_MC_LOAD: begin
        raddr   = {col, sub};
        sm_load = 1'b1;
      end
      S_MC_WR: begin
        waddr  = {col, sub};
        wdata  = mc_out;
        we     = 1'b1;
        sm_rot = 1'b1;
      end
      default: ;
    endcase
  end

  // key and data bytes are accepted only while the core is idle
  a_key_idle:  assert property (@(posedge clk) disable iff (!rst_n) key_we |-> !busy);
  a_data_idle: assert property (@(posedge clk) disable iff (!rst_n) data_we |-> !busy);

  assign dout       = sdata;
  assign dout_valid = (st == S_OUT);
  assign busy       = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      cnt  <= '0;
      kcnt <= '0;
      rnd  <= '0;
      row  <= '0;
      col  <= '0;
      sub  <= '0;
    end else begin
      case (st)
        S_IDLE: begin
          if (key_we) kcnt <= kcnt + 4'd1;
          if (data_we) begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd15) begin
              st  <= S_ARK;
              rnd <= '0;
            end
          end
        end
        S_ARK: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) begin
            if (rnd == 4'(NR)) st <= S_OUT;
            else begin
              st  <= S_KEY;
              rnd <= rnd + 4'd1;
            end
          end
        end
        S_KEY: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) st <= S_SB;
        end
        S_SB: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) begin
            st  <= S_SR_LOAD;
            row <= 2'd1;
            sub <= 2'd0;
          end
        end
        S_SR_LOAD: begin
          sub <= sub + 2'd1;
          if (sub == 2'd3) st <= S_SR_ROT;
        end
        S_SR_ROT: begin
          sub <= sub + 2'd1;
          if (sub == row - 2'd1) begin
            st  <= S_SR_WR;
            sub <= 2'd0;
          end
        end
        S_SR_WR: begin
          sub <= sub + 2'd1;
          if (sub == 2'd3) begin
            if (row != 2'd3) begin
              row <= row + 2'd1;
              st  <= S_SR_LOAD;
            end else if (rnd == 4'(NR)) begin
              st <= S_ARK;
            end else begin
              st  <= S_MC_LOAD;
              col <= 2'd0;
            end
          end
        end
        S_MC_LOAD: begin
          sub <= sub + 2'd1;
          if (sub == 2'd3) st <= S_MC_WR;
        end
        S_MC_WR: begin
          sub <= sub + 2'd1;
          if (sub == 2'd3) begin
            col <= col + 2'd1;
            st  <= (col == 2'd3) ? S_ARK : S_MC_LOAD;
          end
        end
        S_OUT: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
