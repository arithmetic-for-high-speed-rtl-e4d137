100001
100001
100001
100001
1fffc0
1fffc0
1fffc0
1fff80
1fff80
1fff40
1fff00
1ffec0
1ffe80
1ffe40
1ffe00
1ffdc0
1ffd80
1ffd40
1ffd00
1ffc80
1ffc40
1ffbc0
1ffb40
1ffb00
1ffa80
1ffa00
1ff980
1ff900
1ff880
1ff800
1ff740
1ff6c0
1ff640
1ff580
1ff4c0
1ff440
1ff380
1ff2c0
1ff200
1ff140
1ff080
1fefc0
1fef00
1fee40
1fed40
1fec80
1feb80
1feac0
1fe9c0
1fe8c0
1fe800
1fe700
1fe600
1fe500
1fe400
1fe2c0
1fe1c0
1fe0c0
1fdf80
1fde80
1fdd40
1fdc40
1fdb00
1fd9c0
1fd880
1fd740
1fd600
1fd4c0
1fd380
1fd240
1fd0c0
1fcf80
1fce00
1fccc0
1fcb40
1fc9c0
1fc880
1fc700
1fc580
1fc400
1fc280
1fc0c0
1fbf40
1fbdc0
1fbc00
1fba80
1fb8c0
1fb740
1fb580
1fb3c0
1fb200
1fb040
1fae80
1facc0
1fab00
1fa940
1fa740
1fa580
1fa380
1fa1c0
1f9fc0
1f9e00
1f9c00
1f9a00
1f9800
1f9600
1f9400
1f9200
1f8fc0
1f8dc0
1f8bc0
1f8980
1f8780
1f8540
1f8300
1f80c0
1f7ec0
1f7c80
1f7a40
1f7800
1f7580
1f7340
1f7100
1f6e80
1f6c40
1f69c0
1f6780
1f6500
1f6280
1f6040
1f5dc0
1f5b40
1f58c0
1f5600
1f5380
1f5100
1f4e80
1f4bc0
1f4940
1f4680
1f43c0
1f4140
1f3e80
1f3bc0
1f3900
1f3640
1f3380
1f3080
1f2dc0
1f2b00
1f2800
1f2540
1f2240
1f1f80
1f1c80
1f1980
1f1680
1f1380
1f1080
1f0d80
1f0a80
1f0780
1f0440
1f0140
1efe40
1efb00
1ef7c0
1ef4c0
1ef180
1eee40
1eeb00
1ee7c0
1ee480
1ee140
1ede00
1eda80
1ed740
1ed400
1ed080
1ecd00
1ec9c0
1ec640
1ec2c0
1ebf40
1ebbc0
1eb840
1eb4c0
1eb140
1eadc0
1eaa00
1ea680
1ea300
1e9f40
1e9b80
1e9800
1e9440
1e9080
1e8cc0
1e8900
1e8540
1e8180
1e7dc0
1e79c0
1e7600
1e7240
1e6e40
1e6a80
1e6680
1e6280
1e5e80
1e5a80
1e56c0
1e5280
1e4e80
1e4a80
1e4680
1e4280
1e3e40
1e3a40
1e3600
1e3200
1e2dc0
1e2980
1e2540
1e2140
1e1d00
1e18c0
1e1440
1e1000
1e0bc0
1e0780
1e0300
1dfec0
1dfa40
1df600
1df180
1ded00
1de880
1de400
1ddf80
1ddb00
1dd680
1dd200
1dcd80
1dc8c0
1dc440
1dbf80
1dbb00
1db640
1db1c0
1dad00
1da840
1da380
1d9ec0
1d9a00
1d9540
1d9080
1d8b80
1d86c0
1d8200
1d7d00
1d7840
1d7340
1d6e40
1d6980
1d6480
1d5f80
1d5a80
1d5580
1d5080
1d4b40
1d4640
1d4140
1d3c00
1d3700
1d31c0
1d2cc0
1d2780
1d2240
1d1d40
1d1800
1d12c0
1d0d80
1d0840
1d02c0
1cfd80
1cf840
1cf2c0
1ced80
1ce800
1ce2c0
1cdd40
1cd7c0
1cd280
1ccd00
1cc780
1cc200
1cbc80
1cb700
1cb140
1cabc0
1ca640
1ca080
1c9b00
1c9540
1c8fc0
1c8a00
1c8440
1c7e80
1c78c0
1c7300
1c6d40
1c6780
1c61c0
1c5c00
1c5600
1c5040
1c4a80
1c4480
1c3e80
1c38c0
1c32c0
1c2cc0
1c26c0
1c20c0
1c1ac0
1c14c0
1c0ec0
1c08c0
1c02c0
1bfc80
1bf680
1bf080
1bea40
1be400
1bde00
1bd7c0
1bd180
1bcb40
1bc500
1bbec0
1bb880
1bb240
1bac00
1ba5c0
1b9f40
1b9900
1b9280
1b8c40
1b85c0
1b7f80
1b7900
1b7280
1b6c00
1b6580
1b5f00
1b5880
1b5200
1b4b80
1b4500
1b3e40
1b37c0
1b3100
1b2a80
1b23c0
1b1d40
1b1680
1b0fc0
1b0900
1b0240
1afb80
1af4c0
1aee00
1ae740
1ae080
1ad980
1ad2c0
1acc00
1ac500
1abe00
1ab740
1ab040
1aa940
1aa240
1a9b80
1a9480
1a8d80
1a8680
1a7f40
1a7840
1a7140
1a6a40
1a6300
1a5c00
1a54c0
1a4dc0
1a4680
1a3f40
1a3800
1a3100
1a29c0
1a2280
1a1b40
1a1400
1a0c80
1a0540
19fe00
19f680
19ef40
19e800
19e080
19d900
19d1c0
19ca40
19c2c0
19bb40
19b400
19ac80
19a4c0
199d40
1995c0
198e40
1986c0
197f00
197780
197000
196840
196080
195900
195140
194980
1941c0
193a40
193280
192ac0
1922c0
191b00
191340
190b80
1903c0
18fbc0
18f400
18ec00
18e440
18dc40
18d440
18cc80
18c480
18bc80
18b480
18ac80
18a480
189c80
189480
188c80
188440
187c40
187440
186c00
186400
185bc0
185380
184b80
184340
183b00
1832c0
182a80
182240
181a00
1811c0
180980
180140
17f900
17f080
17e840
17e000
17d780
17cf00
17c6c0
17be40
17b5c0
17ad80
17a500
179c80
179400
178b80
178300
177a80
177200
176940
1760c0
175840
174f80
174700
173e40
1735c0
172d00
172440
171bc0
171300
170a40
170180
16f8c0
16f000
16e740
16de80
16d5c0
16cd00
16c400
16bb40
16b240
16a980
16a080
1697c0
168ec0
168600
167d00
167400
166b00
166200
165900
165000
164700
163e00
163500
162c00
162300
1619c0
1610c0
160780
15fe80
15f540
15ec40
15e300
15d9c0
15d0c0
15c780
15be40
15b500
15abc0
15a280
159940
159000
1586c0
157d80
157400
156ac0
156180
155800
154ec0
154540
153c00
153280
152900
151fc0
151640
150cc0
150340
14f9c0
14f040
14e6c0
14dd40
14d3c0
14ca40
14c0c0
14b700
14ad80
14a400
149a40
1490c0
148700
147d40
1473c0
146a00
146040
1456c0
144d00
144340
143980
142fc0
142600
141c40
141280
1408c0
13fec0
13f500
13eb40
13e140
13d780
13cdc0
13c3c0
13ba00
13b000
13a600
139c40
139240
138840
137e40
137440
136a40
136040
135640
134c40
134240
133840
132e40
132440
131a00
131000
1305c0
12fbc0
12f1c0
12e780
12dd40
12d340
12c900
12bec0
12b4c0
12aa80
12a040
129600
128bc0
128180
127740
126d00
1262c0
125880
124e40
1243c0
123980
122f40
1224c0
121a80
121000
1205c0
11fb40
11f100
11e680
11dc00
11d1c0
11c740
11bcc0
11b240
11a7c0
119d40
1192c0
118840
117dc0
117340
1168c0
115e40
1153c0
114900
113e80
113400
112940
111ec0
111400
110980
10fec0
10f440
10e980
10dec0
10d440
10c980
10bec0
10b400
10a940
109e80
1093c0
108900
107e40
107380
1068c0
105e00
105340
104840
103d80
1032c0
1027c0
101d00
101200
100740
1ff8ff
1fe33f
1fcd7f
1fb77f
1fa1bf
1f8bff
1f75ff
1f5fff
1f4a3f
1f343f
1f1e3f
1f083f
1ef23f
1edc3f
1ec63f
1eb03f
1e9a3f
1e843f
1e6dff
1e57ff
1e41bf
1e2b7f
1e157f
1dff3f
1de8ff
1dd2bf
1dbc7f
1da63f
1d8fff
1d79bf
1d637f
1d4cff
1d36bf
1d203f
1d09ff
1cf37f
1cdcff
1cc6bf
1cb03f
1c99bf
1c833f
1c6cbf
1c563f
1c3fbf
1c28ff
1c127f
1bfbff
1be53f
1bcebf
1bb7ff
1ba17f
1b8abf
1b73ff
1b5d3f
1b467f
1b2fbf
1b18ff
1b023f
1aeb7f
1ad4bf
1abdbf
1aa6ff
1a903f
1a793f
1a627f
1a4b7f
1a347f
1a1dbf
1a06bf
19efbf
19d8bf
19c1bf
19aabf
1993bf
197cbf
19657f
194e7f
19377f
19203f
19093f
18f1ff
18daff
18c3bf
18ac7f
18953f
187e3f
1866ff
184fbf
18387f
18213f
1809bf
17f27f
17db3f
17c3ff
17ac7f
17953f
177dbf
17667f
174eff
1737bf
17203f
1708bf
16f13f
16d9bf
16c23f
16aabf
16933f
167bbf
16643f
164cbf
16353f
161d7f
1605ff
15ee7f
15d6bf
15bf3f
15a77f
158fbf
15783f
15607f
1548bf
1530ff
15193f
1501bf
14e9ff
14d23f
14ba3f
14a27f
148abf
1472ff
145b3f
14433f
142b7f
14137f
13fbbf
13e3bf
13cbff
13b3ff
139c3f
13843f
136c3f
13543f
133c3f
13243f
130c7f
12f47f
12dc7f
12c43f
12ac3f
12943f
127c3f
12643f
124bff
1233ff
121bff
1203bf
11ebbf
11d37f
11bb3f
11a33f
118aff
1172ff
115abf
11427f
112a3f
1111ff
10f9bf
10e17f
10c93f
10b0ff
1098bf
10807f
10683f
104fff
1037bf
101f3f
1006ff
1fdcfe
1fac7e
1f7bbe
1f4afe
1f1a3e
1ee97e
1eb8be
1e87be
1e56fe
1e263e
1df53e
1dc47e
1d937e
1d62be
1d31be
1d00be
1ccfbe
1c9ebe
1c6dbe
1c3cbe
1c0bbe
1bdabe
1ba9be
1b787e
1b477e
1b163e
1ae53e
1ab3fe
1a82fe
1a51be
1a207e
19ef3e
19bdfe
198cbe
195b7e
192a3e
18f8fe
18c7be
18963e
1864fe
1833be
18023e
17d0fe
179f7e
176dfe
173cbe
170b3e
16d9be
16a83e
1676be
16453e
1613be
15e23e
15b0be
157f3e
154dbe
151bfe
14ea7e
14b8fe
14873e
1455be
1423fe
13f27e
13c0be
138efe
135d7e
132bbe
12f9fe
12c83e
12967e
1264be
1232fe
12013e
11cf7e
119dbe
116bfe
113a3e
11087e
10d67e
10a4be
1072fe
1040fe
100f3e
1fba3d
1f567d
1ef2bd
1e8efd
1e2b3d
1dc73d
1d637d
1cff7d
1c9bbd
1c37bd
1bd3bd
1b6ffd
1b0bfd
1aa7fd
1a43fd
19dffd
197bfd
1917fd
18b3bd
184fbd
17ebbd
17877d
17237d
16bf3d
165b3d
15f6fd
1592fd
152ebd
14ca7d
14663d
1401fd
139dbd
1339bd
12d57d
1270fd
120cbd
11a87d
11443d
10dffd
107bbd
10173d
1f65bc
1e9cfc
1dd43c
1d0b7c
1c42bc
1b79fc
1ab13c
19e87c
191fbc
1856bc
178dfc
16c4fc
15fc3c
15333c
146a7c
13a17c
12d8bc
120fbc
1146bc
107dbc
1f697b
1dd77b
1c457b
1ab37b
19217b
178f7b
15fd7b
146b7b
12d97b
11477b
1f6a7a
1c463a
1921fa
15fdfa
12d9ba
1f6ab9
192239
12d9b9
192238
192237
000020
