// caes_key_ctrl: key expansion controller for the 3-in-1 key generator.
//
// After a new cipher key has been written (key_loaded) in decryption mode,
// it runs the forward expansion once, Nr cycles, and captures the final
// window into the key generator's final-key register; only then is
// key_ready raised.  In encryption mode the key is ready at once.
// While a block is processed it turns the main controller's blk_load /
// blk_step into key generator controls and keeps the step index s:
//   encryption: load_init with s=0, then forward steps s = 1 .. Nr-1
//   decryption: load_final with s=Nr-1, then backward steps s = Nr-2 .. 0
// so that the key generator shows K(i) (or K(Nr-i)) during round i.
// The step index modulo 3 (192-bit) or 2 (256-bit) plays the role of the
// phase states of the key schedule.  key_start clears key_ready as soon as a
// key transfer begins.
module caes_key_ctrl
  import caes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  keylen_e    keylen,
  input  logic       ende,
  input  logic       key_start,
  input  logic       key_loaded,
  input  logic       blk_load,
  input  logic       blk_step,
  output logic       kg_load_init,
  output logic       kg_load_final,
  output logic       kg_step,
  output logic       kg_dir,
  output logic [3:0] kg_s,
  output logic       kg_cap_final,
  output logic       key_ready
);
  typedef enum logic [1:0] {KC_IDLE, KC_FINAL, KC_CAPTURE, KC_READY} kc_state_e;

  kc_state_e  st;
  logic [3:0] scnt;
  logic [3:0] nr;

  assign nr = 4'(nr_of(keylen));
  assign key_ready = (st == KC_READY);

  always_comb begin
    kg_load_init  = 1'b0;
    kg_load_final = 1'b0;
    kg_step       = 1'b0;
    kg_dir        = 1'b0;
    kg_s          = scnt;
    kg_cap_final  = 1'b0;
    case (st)
      KC_FINAL: begin
        if (scnt == 0) kg_load_init = 1'b1;
        else           kg_step      = 1'b1;
      end
      KC_CAPTURE: kg_cap_final = 1'b1;
      KC_READY: begin
        kg_dir = ende;
        if (blk_load) begin
          if (ende) begin
            kg_load_final = 1'b1;
            kg_s          = nr - 4'd1;
          end else begin
            kg_load_init  = 1'b1;
            kg_s          = 4'd0;
          end
        end else if (blk_step) begin
          kg_step = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st   <= KC_IDLE;
      scnt <= '0;
    end else if (key_start) begin
      st   <= KC_IDLE;
      scnt <= '0;
    end else begin
      case (st)
        KC_IDLE:
          if (key_loaded) begin
            scnt <= '0;
            st   <= ende ? KC_FINAL : KC_READY;
          end
        KC_FINAL: begin
          if (scnt == nr - 4'd1) st <= KC_CAPTURE;
          else                   scnt <= scnt + 4'd1;
        end
        KC_CAPTURE: st <= KC_READY;
        KC_READY: begin
          if (blk_load)      scnt <= ende ? nr - 4'd2 : 4'd1;
          else if (blk_step) scnt <= ende ? scnt - 4'd1 : scnt + 4'd1;
        end
        default: st <= KC_IDLE;
      endcase
    end
  end

  a_no_block_unless_ready: assert property (@(posedge clk) disable iff (rst)
    (blk_load || blk_step) |-> st == KC_READY);
endmodule
