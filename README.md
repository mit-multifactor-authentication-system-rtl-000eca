# Four-factor login terminal on an FPGA

This design is a login station on a Nexys4-class FPGA board. To get in, a user has to show four things:

- a **username** and a **password**, typed on a laptop's serial terminal;
- a tap of an **MIT ID card** on a home-made 125 kHz RFID reader;
- their nine-digit **ID number**, keyed in on a Sony TV remote.

The design collects the four factors, then checks them together against a small identity ROM. The ROM stores an MD5 digest of each password, not the password itself. An XVGA monitor (1024x768) shows the login progress. On success it shows a green welcome screen with a joke picked at random; on failure it shows a red "UNAUTHORIZED" screen for a few seconds.

Everything is written in synthesizable SystemVerilog. Almost all of it runs in a single 65 MHz clock domain, the XVGA pixel clock. A few parts are physical or vendor components and are not in this RTL. Their signals are ports of the top module `mfa_top`:

- the PLL that makes 65 MHz from the board's 100 MHz clock;
- the analog front end of the card reader;
- the IR receiver module;
- the board's USB-serial bridge.

## How a login proceeds

`main_fsm` runs the whole flow. Its states, in order:

| State | What happens | Leaves on |
|---|---|---|
| IDLE | nothing is shown except "MIT LOGIN:" | enter (CR) from the terminal, which proves a terminal is connected |
| SEND_USERNAME_PROMPT | starts the username prompt on the terminal and a 30 s timer | next cycle |
| ECHO_USERNAME_CHAR | collects up to 8 characters, echoing each one | enter |
| SEND_PASSWORD_PROMPT | prompt plus a 30 s timer | next cycle |
| ECHO_PASSWORD_CHAR | collects up to 8 characters, echoing `*` for each | enter |
| SEND_ID_TAP_PROMPT | prompt plus a 30 s timer | next cycle |
| WAIT_ID_TAP | waits for the card data to leave its idle value (0) | a tap |
| ID_NUMBER | sends the ID-number prompt and starts a 60 s timer, then takes nine remote digits | ninth digit |
| WAIT_VALIDITY | the identity check runs | check done |
| AUTHORIZED | green screen with "WELCOME user" and a joke | escape only |
| UNAUTHORIZED | red "UNAUTHORIZED" screen | its 10 s timer |

Rules that hold in every state:

- **Escape** (0x1B), at any time, clears all buffers and returns to IDLE.
- If the current stage's **timer** runs out, the buffers are cleared and the FSM returns to IDLE. This applies to the two typing stages, the tap wait, the ID-number stage and the unauthorized screen.
- The buffers start as **spaces**, so a field that is still empty shows nothing on the screen.
- **Backspace** (0x08 or 0x7F) turns the last character back into a space, unless the field is empty. It is not echoed.
- A character beyond a field's 8 places is **not stored**. Instead, the terminal bell (0x07) is sent.
- The **password** is kept twice: the real characters for the check, and a row of asterisks for the display.

Each remote digit is stored as ASCII, `0x30 + digit`. Typed text is stored with its first character in the most significant byte, so the buffers read like string literals.

The timer lengths, prompt texts, jokes and identities are this design's own choices. They are parameters or short tables and are easy to change.

## Serial link (RS-232, 9600 baud, 8N1)

The receive path runs in this order:

1. synchronizer;
2. sampler at 8 × 9600 Hz;
3. majority-vote downsampler (8 samples in, 1 bit out);
4. framing FSM, `rs232_rx`.

This looks like it would work with a free-running downsampler, but it does not. Characters arrive at arbitrary times, so a fixed 8-sample window often straddles a bit edge, and the vote then garbles the bit.

`rs232_rx_pipeline` fixes this with a small feedback loop:

- an edge detector looks for falling edges, which are possible start bits;
- each falling edge restarts the downsampler, so its windows line up with the bit cells of the new frame;
- the framing FSM's `busy` flag blocks this restart while a frame is being received, because falling edges inside the data bits are not start bits.

Losing a sample or two at the restart does not matter, since each window is then aligned with a real bit.

The receiver is parameterized in data, parity and stop bits. A frame with a bad start, parity or stop bit is dropped silently. Each character leaves with a one-cycle `valid` pulse and is held until the next one.

The transmitter, `rs232_tx`, sends one character per `send` pulse. Its baud divider is restarted at each send. It pulses `done` when the last stop bit ends.

Four instances of `serial_prompt` each hold one fixed string. Each sends its next character when the previous one's `done` arrives.

`serial_output_selector` merges every source of characters into the one transmitter, with this priority:

- bell (highest);
- echo;
- prompt 0 (username) through prompt 3 (ID number).

## Remote control (Sony SIRC)

The IR receiver's output is active low.

`sirc_pipeline` processes it as follows:

1. inverts it;
2. synchronizes it;
3. samples it every 75 µs;
4. takes a majority of 8 samples, which gives one value per 600 µs protocol slot.

`sirc_decoder` works on these slots:

- A start mark is at least four marked slots (2.4 ms) followed by a space.
- After that, the slot pattern `1,0` is a 0 bit and `1,1,0` is a 1 bit, least significant bit first.
- After 12 bits the decoder outputs the code: 7 command bits, then 5 address bits.
- Three marked slots in a row inside a frame are not a valid bit, so the decoder drops the frame.

`sirc_number_conversion` turns a key's command into its digit. Commands 0–8 are keys 1–9 and command 9 is key 0. Any other command is ignored.

A held key repeats its frame about every 45 ms. `deduplicator` therefore passes one digit and then ignores the remote for one second. Its `ready` output drives the upper eight LEDs, so the user can see when the next digit will be accepted. As a result, entering an ID number takes at least nine seconds.

**Limitation.** Unlike the serial path, the slot downsampler is not realigned to the signal. If a frame's edges fall near the middle of the 8-sample windows, a bit can be misread and the frame dropped. A held key sends several frames at different phases, so in practice a digit still gets through. The testbenches send every key as three frames.

## Card reader

`square_wave_gen` drives the reader's coil with a 125 kHz carrier (520 clocks per period).

The card answers with phase-shift keying at 4 kbit/s. The analog front end turns that into a clean digital signal with a Schmitt trigger.

`id_card_pipeline` processes that signal as follows:

1. synchronizes it;
2. samples it at 32 kHz;
3. takes a majority of 8 samples, giving one value per data bit;
4. `psk_decoder` outputs a 1 wherever the phase flips and a 0 elsewhere;
5. `flexsecure_descrambler` shifts the bits into a 32-bit window and turns them into card data.

The card data goes to the main FSM and to the eight-digit hex display.

The card's scrambling is weak: one bit is duplicated, two bits are XORed together, the rest are shuffled, and the result is XORed with a fixed key. `flexsecure_descrambler` has this structure, with these parameters:

- `PERM`: for each output bit, which window bit it takes, so a bit can be repeated;
- `XOR_POS` and `XOR_SRC`: one output bit XORed with a second window bit;
- `KEY`: the final XOR.

The real bit map and key are not known here, so all four parameters default to "no change". The hardware therefore shows the raw PSK-decoded window, not the card's printed number. The login only needs to see that a card is present, and that works with any map. To recover real card numbers, set the four parameters.

## Identity check

`identity_database` holds one 264-bit record per identity in `rtl/identity_db.hex`, one record per line in hex. A record is built from:

- the username, padded with spaces to 8 ASCII characters (64 bits);
- the MD5 digest of the password, also padded with spaces to 8 characters (128 bits, in the usual printed byte order);
- the ID number as 9 ASCII digits (72 bits).

To add an identity, append such a line and raise the `ENTRIES` parameter.

A check runs in two phases:

- **Hashing.** `md5` hashes the typed password (8 bytes) in 69 cycles:
  - one setup cycle;
  - one chunk-setup cycle;
  - 64 round cycles, one MD5 step each;
  - one chunk-finalization cycle;
  - one output cycle.
- **Searching.** The records are compared one per clock cycle: username, digest and ID number together. It stops at the first full match (authorized) or after the last record (refused).

The message size is a parameter (`IN_BYTES`), so the padding and length block are fixed wiring. The latency is 3 + 66 × (number of 512-bit chunks) cycles. The round constants (floor(2^32·|sin(i+1)|)) and rotation amounts are small case tables.

The ROM in this repository holds five test identities:

| username | password | ID number |
|---|---|---|
| aneesh | wildcat | 912345678 |
| paige | joke6111 | 923456789 |
| alex | mentor | 934567890 |
| gim | fpga | 945678901 |
| student | password | 956789012 |

## Display

`xvga` produces standard 1024x768 at 60 Hz timing at 65 MHz:

- 1344 × 806 clocks per frame;
- hsync low for columns 1048–1183;
- vsync low for lines 771–776.

`renderer` is a three-stage pipeline:

1. **`address_calculator`** finds which 32x32 character box the pixel is in.
   - Text lines are 64 pixels apart, starting at y = 64 (`TOP`).
   - Characters start at x = 64 (`INDENT`), with up to 32 per line.
   - It picks the text of that line for the active screen (table below).
   - It outputs the character code, the row and column inside the box, and a flag for "inside a box". The syncs are delayed to match.
2. **`character_spritemap`** looks up the pixel. The ROM address is just the concatenation {character, row, column}, so no arithmetic is needed.
3. **`background_selector`** colours the pixel:
   - white on the login screens;
   - green on the authorized screen;
   - red on the unauthorized screen;
   - always black background.

The pixel and both syncs leave three clocks after `xvga` produces the position. The colour is forced to black during blanking.

The text on each screen:

| Line | Login (items appear as the flow advances) | Authorized | Unauthorized |
|---|---|---|---|
| 0 | `MIT LOGIN:` | `AUTHORIZED` | `UNAUTHORIZED` |
| 1 | `USERNAME: ` + username | `WELCOME ` + username | |
| 2 | `PASSWORD: ` + asterisks | | |
| 3 | `TAP ID CARD`, then `ID TAPPED` | joke line 1 | |
| 4 | `ID NUMBER: ` + digits | joke line 2 | |
| 5 | | joke line 3 | |

**Font.** Each glyph is stored at 16x16 pixels and drawn doubled to fill its 32x32 box. This keeps the font image (`rtl/char_sprites.hex`) to 1024 words of 32 bits.

- Word *w* holds character *w*/8.
- It contains glyph rows 2·(*w* mod 8) and 2·(*w* mod 8)+1, in its upper and lower halves.
- In each row, the most significant bit is the leftmost pixel.

The glyphs are a rasterization of DejaVu Sans Mono Bold, centred in their boxes. A full 32x32 font would fit the same interface: store one bit per pixel and drop the halving of the row and column indices.

`joke_database` holds 8 jokes, each 3 lines of 28 characters. A counter runs through them on every clock cycle. The joke under the counter when the check succeeds is the one latched, which makes the choice effectively random.

## Clocks, reset and board connections

- The reset button is debounced in the 100 MHz domain (10 ms). The debounced button also feeds the external PLL's reset (`clockgen_reset`).
- That button, ORed with "PLL not locked", goes through a synchronizer into the 65 MHz domain and becomes the global synchronous `reset`. Nothing runs until the clock is stable.
- `led[15:8]` is the remote-ready flag; `led[3:0]` is the FSM state.
- The eight-digit display shows the card data.

| Port | Connects to |
|---|---|
| `clk_100mhz`, `clk_65mhz`, `clocks_locked`, `clockgen_reset` | board oscillator and the PLL |
| `btn_reset` | reset button |
| `uart_rx`, `uart_tx` | USB-serial bridge |
| `ir_n` | IR receiver output (active low) |
| `rfid_carrier`, `rfid_in` | coil driver input and Schmitt trigger output of the reader |
| `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs` | VGA connector |
| `seg_n`, `dp_n`, `an_n`, `led` | seven-segment displays and LEDs |

## Where this design fills gaps in, or departs from, the original description

- **Font.** Glyphs are 16x16 shown doubled, instead of true 32x32 glyphs. This keeps the font file small; see above.
- **Card descrambling.** The transform's bit map and key are left as parameters defaulting to identity, so card numbers are not decoded.
- **Chosen here:**
  - the prompt texts;
  - the screen layout and labels;
  - seven of the eight jokes (the first is the sodium joke);
  - the five identities;
  - all stage timeouts;
  - the idle card value (0);
  - the serial frame format (8N1, no parity).
- **Identity records.** The identity ROM hashes the *space-padded* password, matching how usernames and passwords are padded to 8 characters.
- **Serial frame order.** The transmitter sends the standard start bit, 8 data bits LSB first, then the stop bit. The original wording listed "stop bits" first; that is taken to mean the start bit.
- **"MIT LOGIN:" width.** The heading is 10 characters (80 bits), although a 72-bit register was described for it.
- **SIRC slots.** The slot length is 600 µs, which matches the 2.4 ms start mark and the 75 µs × 8 sampling.
- **Remote phase.** The remote path keeps a free-running slot downsampler, so a frame at an unlucky phase can be lost (see above).

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. Run them from the repository root, because the ROM files are read by the paths `rtl/...`. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_mfa_top -y rtl -y tb rtl/mfa_pkg.sv tb/tb_mfa_top.sv
./obj_dir/Vtb_mfa_top
```

Notable testbenches:

- **`tb_mfa_top`** runs the whole system end to end at a 1 MHz clock and 15625 baud. It models the terminal, the remote, the card and the clocks, and plays three sessions:
  - a valid login with a backspace, an overflowing password (bell), a card tap, nine held-key digits, the green screen and escape;
  - a wrong password, giving the red screen until its timeout;
  - a username stage that times out.

  It then presses reset. It checks the terminal text, the buffers, the states and the colours on the VGA pins, and counts every mechanism. It takes roughly 65 million cycles.
- **`tb_mfa_top_full`** uses every default: 65 MHz, 9600 baud and one-second timers. It covers a login up to the first ID digit and escape. A complete default-size login needs nine one-second digit lock-outs, more than 600 million cycles. It was not simulated in full: the largest complete run is `tb_mfa_top` at a 1 MHz clock.
- **`tb_renderer`** compares three whole frames pixel by pixel against a model of the screen text and the font file.
- **`tb_md5`** checks known digests for 1-, 3-, 55-, 56- and 80-byte messages, including the two-chunk cases, and the latency.
- The other testbenches drive each block directly. Where the block has a defined rate or latency, they check the cycle counts too.
